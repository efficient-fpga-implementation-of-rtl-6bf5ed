// gpc_chain - a chain of (6,0,7;5) counters that sums six bits on every other
// digit into one binary number.
//
// The chain has K digits; digit j carries weight 4^j (its bits sit at binary
// position 2j of the numbers being added) and holds six input bits col[j].
// Counter k takes digit 2k as its weight-1 column and digit 2k+1 as its
// weight-4 column, writes sum bits 4k..4k+3, and passes its cout to the
// carry-in of counter k+1, so every counter above the first gets its seventh
// weight-1 bit from the chain and fits in one slice. The first counter's
// carry-in is the port cin (a free seventh bit; tie it to 0 if unused).
// When K is odd the top digit has no partner and a (7;3) counter takes it.
//   sum = cin + sum_j popcount(col[j]) * 4^j,  2K+1 bits wide.
// The chaining follows the design; the port layout is this implementation's.
// Combinational; the carry ripples through ceil(K/2) slices.
module gpc_chain #(
  parameter int unsigned K = 8                 // number of digits (every other bit)
) (
  input  logic [5:0]    col [K],               // six bits of each digit
  input  logic          cin,                   // carry-in of the first counter
  output logic [2*K:0]  sum                    // binary sum
);
  localparam int unsigned NFULL = K / 2;       // (6,0,7;5) counters
  localparam bit          ODD   = (K % 2) == 1; // top digit handled by a (7;3)

  logic [NFULL:0] carry;                        // carry[k] enters counter k
  assign carry[0] = cin;

  for (genvar k = 0; k < NFULL; k++) begin : g_gpc
    gpc_6_0_7_5 u_gpc (
      .a    ({col[2*k], carry[k]}),
      .b    (col[2*k+1]),
      .s    (sum[4*k +: 4]),
      .cout (carry[k+1])
    );
  end

  if (ODD) begin : g_top73
    gpc_7_3 u_gpc73 (
      .a ({col[K-1], carry[NFULL]}),
      .s (sum[2*K-2 +: 3])
    );
  end else begin : g_top_carry
    assign sum[2*K] = carry[NFULL];
  end
endmodule
