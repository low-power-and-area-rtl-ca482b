// mfcf_pa: feedforward-cutset-free pipelined accumulator on borrow-save
// segments.
//
// The W-bit accumulator is kept as a borrow-save number (acc_p - acc_n) and
// cut into W/SEG segments of SEG bits, each an SEG-bit borrow-save adder (bsa).
// On every cycle with in_valid high each segment adds its slice of the
// incoming borrow-save operand (xp - xn) to its slice of the accumulator. The
// positive and negative carries leaving segment k are not passed on in the
// same cycle: they are caught in one flip-flop each and enter segment k+1 on
// its carry inputs at the next addition. A conventional pipelined adder would
// instead delay the operand slices of the upper segments with rows of skew
// flip-flops (the feedforward cutset); those are left out, and the only
// flip-flops beyond the accumulator itself are the 2*(W/SEG-1) carry bits.
//
// Because carries wait in their flip-flops, the accumulated value is
//   acc_p - acc_n + car_p - car_n   (mod 2^W),
// where car_p/car_n carry the pending carries at bit positions SEG*k. That
// invariant holds after every cycle, so the value can be read at any time by
// the result converter (bsd_resolve). Carries out of the top segment are
// dropped: arithmetic wraps modulo 2^W.
//
// in_clear (with in_valid) restarts the sum: the segments then add the operand
// to zero and ignore pending carries. When in_valid is low nothing changes.
// Reset (asynchronous, active low) zeroes everything. car_p/car_n are 0
// except at bits SEG*k, k >= 1, by construction. W must be a multiple of
// SEG. Segmenting with carry flip-flops follows the feedforward-cutset-free
// scheme; the clear input and reset are this design's choices.
module mfcf_pa #(
  parameter int W   = 64,
  parameter int SEG = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_clear,
  input  logic [W-1:0] xp,
  input  logic [W-1:0] xn,
  output logic [W-1:0] acc_p,
  output logic [W-1:0] acc_n,
  output logic [W-1:0] car_p,
  output logic [W-1:0] car_n
);
  localparam int NS = W / SEG;

  logic [W-1:0]  acc_p_q, acc_n_q;
  logic [NS-1:1] cp_q, cn_q;        // carry waiting to enter segment k
  logic [W-1:0]  yp, yn, sp, sn;
  logic [NS-1:0] cip, cin, cpo, cno;

  always_comb begin
    yp  = in_clear ? '0 : acc_p_q;
    yn  = in_clear ? '0 : acc_n_q;
    cip = '0;
    cin = '0;
    if (!in_clear) begin
      cip[NS-1:1] = cp_q;
      cin[NS-1:1] = cn_q;
    end
  end

  for (genvar k = 0; k < NS; k++) begin : g_seg
    bsa #(.N(SEG)) u_seg (
      .xp   (xp[SEG*k +: SEG]), .xn(xn[SEG*k +: SEG]),
      .yp   (yp[SEG*k +: SEG]), .yn(yn[SEG*k +: SEG]),
      .cin_p(cip[k]), .cin_n(cin[k]),
      .sp   (sp[SEG*k +: SEG]), .sn(sn[SEG*k +: SEG]),
      .cpout(cpo[k]), .cnout(cno[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_p_q <= '0;
      acc_n_q <= '0;
      cp_q    <= '0;
      cn_q    <= '0;
    end else if (in_valid) begin
      acc_p_q <= sp;
      acc_n_q <= sn;
      cp_q    <= cpo[NS-2:0];
      cn_q    <= cno[NS-2:0];
    end
  end

  always_comb begin
    car_p = '0;
    car_n = '0;
    for (int k = 1; k < NS; k++) begin
      car_p[SEG*k] = cp_q[k];
      car_n[SEG*k] = cn_q[k];
    end
  end

  assign acc_p = acc_p_q;
  assign acc_n = acc_n_q;

  initial assert (W % SEG == 0 && W / SEG >= 2) else $error("mfcf_pa: W must be a multiple of SEG, at least two segments");
endmodule
