// array_multiplier: unsigned N x N array multiplier built from AND gates,
// half adders and full adders.
//
// Partial product row i is a AND b[i]. Row 0 passes straight into the
// array; every following row adds its partial product to the upper N bits
// of the running sum with a ripple chain (a half adder in bit 0, full
// adders above it). In row 1 the running sum has no carry bit yet, so its
// top position is a half adder too. For N = 4 this gives 16 AND gates,
// 4 half adders and 8 full adders. The low bit of each row's sum is a
// finished product bit; the last row gives the top N+1 bits.
//
// Interface: a, b (N bits each) in, p (2N bits) out. Purely combinational:
// the product is valid one array delay after the operands change.
//
// The 4-bit width and the construction from gate-level half and full adders
// follow the source design; the exact ripple-row arrangement is this
// implementation's choice, as only a vendor schematic of it is published.
module array_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // row0: first partial product, zero-extended to N+1 bits; each g_row[i]
  // holds its own running sum row_sum (N+1 bits, carry out on top)
  logic [N:0] row0;

  assign row0 = {1'b0, a & {N{b[0]}}};

  for (genvar i = 1; i < N; i++) begin : g_row
    logic [N:0]   prev;     // running sum of the row above
    logic [N:0]   row_sum;  // running sum after this row
    logic [N-1:0] x;        // upper N bits of the previous running sum
    logic [N-1:0] y;        // partial product of this row
    logic [N-1:0] s;        // sum bits
    logic [N:1]   c;        // c[j]: carry into bit j

    if (i == 1) begin : g_first
      assign prev = row0;
    end else begin : g_next
      assign prev = g_row[i-1].row_sum;
    end

    assign x = prev[N:1];
    assign y = a & {N{b[i]}};

    for (genvar j = 0; j < N; j++) begin : g_bit
      if (j == 0) begin : g_ha0
        half_adder u_ha (.a(x[0]), .b(y[0]), .s(s[0]), .c(c[1]));
      end else if (i == 1 && j == N - 1) begin : g_hatop
        // x[N-1] is row 0's carry, which is always zero
        half_adder u_ha (.a(y[j]), .b(c[j]), .s(s[j]), .c(c[j+1]));
      end else begin : g_fa
        full_adder u_fa (.a(x[j]), .b(y[j]), .cin(c[j]), .s(s[j]), .cout(c[j+1]));
      end
    end

    assign row_sum = {c[N], s};

    // the low bit of each row but the last is a finished product bit
    if (i < N - 1) begin : g_pbit
      assign p[i] = row_sum[0];
    end
  end

  assign p[0]           = row0[0];
  assign p[2*N-1:N-1]   = g_row[N-1].row_sum;

  initial begin
    assert (N >= 2) else $error("array_multiplier: N must be at least 2");
  end

endmodule
