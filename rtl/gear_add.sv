// gear_add: Generic Accuracy-configurable adder GeAr(N, R, P).
//
// The N-bit addition is split into overlapping sub-adders of L = R + P bits
// that work in parallel with no carry between them. The first sub-adder
// adds bits L-1..0 and gives all L of its sum bits. Sub-adder i (i >= 1)
// adds bits i*R+L-1 .. i*R: its low P bits only predict the carry coming
// from below, and only its top R bits are kept as result bits
// i*R+L-1 .. i*R+P. There are (N-L)/R + 1 sub-adders, so (N-L) must be a
// multiple of R. cout is the carry out of the last sub-adder. The result
// is exact unless a carry chain is longer than P+1 bits.
// Defaults N=16, R=4, P=4 (L=8, three sub-adders) are the configuration
// used in the convolution accelerator. Purely combinational; the carry path
// is L bits long instead of N.
module gear_add #(
  parameter int unsigned N = 16,
  parameter int unsigned R = 4,
  parameter int unsigned P = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned L = R + P;
  localparam int unsigned K = (N - L) / R + 1;

  if (L > N || (N - L) % R != 0) begin : g_bad_cfg
    $error("gear_add: (N - (R+P)) must be a non-negative multiple of R");
  end

  logic [L:0] sub [K];

  for (genvar i = 0; i < K; i++) begin : g_sub
    assign sub[i] = {1'b0, a[i*R +: L]} + {1'b0, b[i*R +: L]};
    if (i == 0) begin : g_first
      assign s[L-1:0] = sub[i][L-1:0];
    end else begin : g_next
      assign s[i*R+P +: R] = sub[i][P +: R];
    end
  end

  assign cout = sub[K-1][L];

endmodule
