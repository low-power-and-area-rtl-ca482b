// tb_bsa: test of the borrow-save adder.
// 1. The worked four-bit example (Xp=0111, Xn=0000, Yp=0001, Yn=0000, carry
//    in 0) must give exactly Sp=1110, Sn=0110, Cpout=0, Cnout=0.
// 2. Four fixed example input sets, then every one of the 2^18 four-bit input
//    combinations: sp - sn + 16*(cpout - cnout) must equal
//    xp - xn + yp - yn + cin_p - cin_n exactly.
// 3. A 32-bit instance with random operands, same identity.
module tb_bsa;
  logic [3:0] xp, xn, yp, yn, sp, sn;
  logic       cin_p, cin_n, cpout, cnout;
  logic [31:0] wxp, wxn, wyp, wyn, wsp, wsn;
  logic        wcp, wcn, wcpo, wcno;
  int checks = 0, failures = 0;

  bsa dut (.xp, .xn, .yp, .yn, .cin_p, .cin_n, .sp, .sn, .cpout, .cnout);
  bsa #(.N(32)) dut_w (.xp(wxp), .xn(wxn), .yp(wyp), .yn(wyn), .cin_p(wcp), .cin_n(wcn),
                       .sp(wsp), .sn(wsn), .cpout(wcpo), .cnout(wcno));

  task automatic check4();
    int got, want;
    #1;
    got  = int'(sp) - int'(sn) + 16 * (int'(cpout) - int'(cnout));
    want = int'(xp) - int'(xn) + int'(yp) - int'(yn) + int'(cin_p) - int'(cin_n);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL xp=%b xn=%b yp=%b yn=%b cp=%b cn=%b -> sp=%b sn=%b cpo=%b cno=%b (%0d, want %0d)",
               xp, xn, yp, yn, cin_p, cin_n, sp, sn, cpout, cnout, got, want);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example, bit-exact.
    xp = 4'b0111; xn = 4'b0000; yp = 4'b0001; yn = 4'b0000; cin_p = 0; cin_n = 0;
    #1;
    checks++;
    if (sp != 4'b1110 || sn != 4'b0110 || cpout || cnout) begin
      failures++;
      $display("FAIL worked example: sp=%b sn=%b cpout=%b cnout=%b", sp, sn, cpout, cnout);
    end
    check4();
    // Example input sets: {xp, xn, carry, yp, yn, carry}.
    {xp, xn, cin_p, yp, yn, cin_n} = {4'b0000, 4'b0000, 1'b0, 4'b0000, 4'b0000, 1'b0}; check4();
    {xp, xn, cin_p, yp, yn, cin_n} = {4'b0001, 4'b0000, 1'b1, 4'b0001, 4'b0000, 1'b0}; check4();
    {xp, xn, cin_p, yp, yn, cin_n} = {4'b0000, 4'b0001, 1'b0, 4'b0000, 4'b0001, 1'b1}; check4();
    {xp, xn, cin_p, yp, yn, cin_n} = {4'b1111, 4'b1111, 1'b0, 4'b1111, 4'b1111, 1'b0}; check4();
    // Exhaustive.
    for (int v = 0; v < (1 << 18); v++) begin
      {xp, xn, yp, yn, cin_p, cin_n} = 18'(v);
      check4();
    end
    // Wide instance.
    for (int i = 0; i < 2000; i++) begin
      longint got, want;
      wxp = $urandom; wxn = $urandom; wyp = $urandom; wyn = $urandom;
      wcp = 1'($urandom); wcn = 1'($urandom);
      #1;
      got  = longint'(wsp) - longint'(wsn) + (longint'(wcpo) - longint'(wcno)) * (64'sd1 << 32);
      want = longint'(wxp) - longint'(wxn) + longint'(wyp) - longint'(wyn) + longint'(wcp) - longint'(wcn);
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL N=32: got %0d want %0d", got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
