// Post-processing unit of the sign detector.
//
// Forms the sign bit, bit N-1 of alpha2 = (2*cy + s + W) mod 2^N, from the
// outputs of the carry generation unit and the carry-in W:
//   carry into bit N-1 = G[N-2:0] | (P[N-2:0] & W)
//   sign               = P(N-1) ^ carry into bit N-1
// These are the carry and sum equations of a prefix adder with carry-in W,
// restricted to its top bit. Purely combinational; no clock.
module post_proc_unit (
  input  logic p_msb,   // P(N-1), propagate of the top position
  input  logic g_grp,   // G[N-2:0]
  input  logic p_grp,   // P[N-2:0]
  input  logic w,       // carry-in W
  output logic sign
);

  logic c_top;

  always_comb begin
    c_top = g_grp | (p_grp & w);
    sign  = p_msb ^ c_top;
  end

endmodule
