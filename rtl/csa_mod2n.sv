// Carry-save adder modulo 2^N.
//
// Reduces three N-bit operands to a sum vector s (N bits) and a carry vector
// cy (N-1 bits) such that (a + b + c) mod 2^N = (2*cy + s) mod 2^N. Each bit
// position is a full adder: s[i] = a[i] ^ b[i] ^ c[i], and the majority of the
// three bits is the carry into position i+1, cy[i]. The carry out of the top
// position has weight 2^N and is dropped, which is what makes the adder modulo
// 2^N and the carry vector N-1 bits wide.
//
// The widths n and n-1 of S and C follow the design; the full-adder row is the
// usual carry-save adder and is this implementation's choice of insides.
// Purely combinational; no clock.
module csa_mod2n #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-2:0] cy   // cy[i] has weight 2^(i+1)
);

  always_comb begin
    s  = a ^ b ^ c;
    // Majority of the lower N-1 positions; the majority of position N-1 would
    // carry weight 2^N and is not formed (mod 2^N).
    cy = (a[N-2:0] & b[N-2:0]) | (a[N-2:0] & c[N-2:0]) | (b[N-2:0] & c[N-2:0]);
  end

endmodule
