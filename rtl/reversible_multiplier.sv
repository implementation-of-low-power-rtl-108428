// reversible_multiplier: W x W unsigned multiplier whose partial products come
// from BVPPG gates and whose rows are summed by Peres-gate ripple carry adders.
//
// Partial products: for each multiplier bit b[j], W/2 BVPPG gates each take
// (A = a[2k], B = b[j], C = 0, D = a[2k+1], E = 0) and give a[2k]b[j] on R and
// a[2k+1]b[j] on T, so one gate makes two product terms and fans out the operand
// bits itself. Reduction: row j, shifted left by j, is added to the running sum
// with a W-bit peres_rca, giving an array of W-1 ripple adders.
//
// The processor keeps 32-bit results, so only the low W bits of the product are
// produced (bits that would fall above bit W-1 are dropped). The pairing of
// operand bits on the gates and the row-by-row array are this implementation's
// choices. Purely combinational; W must be even.
module reversible_multiplier #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p      // low W bits of a * b
);
  logic [W-1:0] pp   [W];     // pp[j][i] = a[i] & b[j]
  logic [W-1:0] part [W];     // running sums
  logic [W-1:0] co;           // adder carries, dropped with the upper product bits

  for (genvar j = 0; j < W; j++) begin : g_row
    for (genvar k = 0; k < W/2; k++) begin : g_pair
      logic fa, fb, fd;       // operand copies passed on by the gate
      bvppg_gate u_ppg (
        .a(a[2*k]), .b(b[j]), .c(1'b0), .d(a[2*k+1]), .e(1'b0),
        .p(fa), .q(fb), .r(pp[j][2*k]), .s(fd), .t(pp[j][2*k+1])
      );
    end
  end

  assign part[0] = pp[0];
  assign co[0]   = 1'b0;
  for (genvar j = 1; j < W; j++) begin : g_sum
    peres_rca #(.W(W)) u_add (
      .a(part[j-1]), .b(pp[j] << j), .cin(1'b0), .sum(part[j]), .cout(co[j])
    );
  end

  assign p = part[W-1];

  initial assert (W % 2 == 0) else $fatal(1, "reversible_multiplier: W must be even");
endmodule
