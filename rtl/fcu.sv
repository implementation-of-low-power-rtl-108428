// fcu: flexible computational unit (arithmetic and logic unit) with its output
// register Acc1.
//
// The FCU combines the operand on the data bus with the accumulator, as selected
// by the opcode, and the result is captured in Acc1 on the clock edge that ends
// an execute cycle (exec_en high; this plays the role of the "execlk" of the
// design). Acc1 then feeds the accumulator. Data are unsigned.
//
// Operations and the reversible gates that build them:
//   LDA  data                      (pass the operand)
//   ADD  acc + data                Peres-gate ripple carry adder, cin = 0
//   SUB  acc - data                same adder; data is inverted by Feynman gates
//                                  controlled by 1 and cin = 1 (two's complement)
//   MUL  low 32 bits of acc * data BVPPG partial products + Peres adder array
//   AND  acc & data                Toffoli gate, C = 0
//   NAND ~(acc & data)             Toffoli gate, C = 1
//   XOR  acc ^ data                Feynman gate
//   NOT  ~acc                      Feynman gate with control 1
//   OR   acc | data, SHL / SHR acc by one bit (logical)   plain logic
//   other opcodes                  Acc1 <- acc (accumulator unchanged)
// Addition, subtraction, multiplication and the AND/OR/NAND family follow the
// design; the choice of gate for each logic operation, and XOR, NOT and shifts
// by one, are this implementation's. Division is not built (see the README).
// Interface: combinational result on `result`, registered result on `acc1`,
// cleared by the active-low asynchronous reset.
module fcu
  import risc_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         exec_en,   // end of an execute cycle: capture into Acc1
  input  opcode_e      opcode,
  input  logic [W-1:0] data,      // operand from the data bus
  input  logic [W-1:0] acc,       // accumulator
  output logic [W-1:0] result,    // combinational result
  output logic [W-1:0] acc1       // registered result (Acc1)
);
  logic         is_sub;
  logic [W-1:0] b_cond, sum, prod, and_r, nand_r, xor_r, not_r;
  logic         cout;

  assign is_sub = (opcode == OP_SUB);

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic fp0, fp1, fp2, tp0, tq0, tp1, tq1;
    // conditional inversion of the operand for subtraction
    feynman_gate u_inv  (.a(is_sub), .b(data[i]), .p(fp0), .q(b_cond[i]));
    // logic operations
    toffoli_gate u_and  (.a(acc[i]), .b(data[i]), .c(1'b0), .p(tp0), .q(tq0), .r(and_r[i]));
    toffoli_gate u_nand (.a(acc[i]), .b(data[i]), .c(1'b1), .p(tp1), .q(tq1), .r(nand_r[i]));
    feynman_gate u_xor  (.a(acc[i]), .b(data[i]), .p(fp1), .q(xor_r[i]));
    feynman_gate u_not  (.a(1'b1),   .b(acc[i]),  .p(fp2), .q(not_r[i]));
  end

  peres_rca #(.W(W)) u_addsub (
    .a(acc), .b(b_cond), .cin(is_sub), .sum(sum), .cout(cout)
  );

  reversible_multiplier #(.W(W)) u_mul (.a(acc), .b(data), .p(prod));

  always_comb begin
    case (opcode)
      OP_LDA:         result = data;
      OP_ADD, OP_SUB: result = sum;
      OP_MUL:         result = prod;
      OP_AND:         result = and_r;
      OP_OR:          result = acc | data;
      OP_NAND:        result = nand_r;
      OP_XOR:         result = xor_r;
      OP_NOT:         result = not_r;
      OP_SHL:         result = acc << 1;
      OP_SHR:         result = acc >> 1;
      default:        result = acc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       acc1 <= '0;
    else if (exec_en) acc1 <= result;
  end
endmodule
