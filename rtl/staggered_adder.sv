// staggered_adder: a WIDTH-bit adder pipelined over two stages, EX1 and EX2,
// each holding one HALF-bit adder. EX1 adds the lower halves and passes the
// carry on; one cycle later EX2 adds the upper halves with that carry. Each
// stage therefore takes only one half-width addition, and the adder accepts
// a new addition every cycle.
//
// Back-to-back dependent additions do not stall: the lower half of a sum is
// ready at the end of EX1, exactly when the next addition needs its lower
// operand in EX1, and the upper half is ready at the end of EX2, when the
// next addition needs its upper operand in EX2. Two muxes in front of each
// half-adder select between the operand and the feedback of the previous
// sum's same half. dep_a (dep_b) replaces operand A (B) by the sum of the
// most recent earlier addition.
//
// Timing: a, b, dep_a, dep_b are captured with in_valid at a rising edge
// (the register in front of EX1); the sum is registered after EX2 and is
// presented with out_valid three edges after the operands were captured,
// i.e. latency 2 cycles of computation, throughput one addition per cycle.
// The stage structure and the two feedback paths follow the superpipelined
// adder of the design (32 bits as two 16-bit halves); the in_valid/out_valid
// handshake and the dep_* controls are this design's own interface.
//
// STAGGER=0 builds the same two stages without the staggered feedback, as
// a baseline: a dependent addition gets the whole previous sum, from the
// output register, at the input of EX1 (the upper half of that operand then
// travels to EX2 in the EX1/EX2 register). The sum is complete only at the
// end of EX2, so an addition that depends on the one accepted in the
// previous cycle has to wait one cycle: in_ready is low while dep_a or
// dep_b is set and an addition was accepted at the last edge, and an
// addition is accepted only when in_valid and in_ready are both high.
// This is the cost the staggered feedback removes. With STAGGER=1 in_ready
// is always high.
module staggered_adder #(
  parameter int WIDTH = 32,
  parameter int HALF  = 16,
  parameter bit STAGGER = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             dep_a,
  input  logic             dep_b,
  output logic             in_ready,
  output logic             out_valid,
  output logic [WIDTH-1:0] sum
);
  localparam int UP = WIDTH - HALF;

  // operand register (in front of EX1)
  logic             v0;
  logic [WIDTH-1:0] a0, b0;
  logic             da0, db0;

  // EX1/EX2 register
  logic             v1;
  logic [HALF-1:0]  s_lo1;     // lower sum, also the EX1 feedback
  logic             c1;        // carry into the upper half
  logic [UP-1:0]    a_hi1, b_hi1;
  logic             da1, db1;

  // output register
  logic             v2;
  logic [HALF-1:0]  s_lo2;
  logic [UP-1:0]    s_hi2;     // upper sum, also the EX2 feedback

  // EX1 operands: with staggering only the lower halves are selected here;
  // without it the whole previous sum replaces the operand
  logic [WIDTH-1:0] op_a, op_b;
  logic             fb_a_hi, fb_b_hi;   // feedback into the upper half in EX2
  if (STAGGER) begin : g_stagger
    assign op_a    = {a0[WIDTH-1:HALF], da0 ? s_lo1 : a0[HALF-1:0]};
    assign op_b    = {b0[WIDTH-1:HALF], db0 ? s_lo1 : b0[HALF-1:0]};
    assign fb_a_hi = da1;
    assign fb_b_hi = db1;
    assign in_ready = 1'b1;
  end else begin : g_plain
    assign op_a    = da0 ? {s_hi2, s_lo2} : a0;
    assign op_b    = db0 ? {s_hi2, s_lo2} : b0;
    assign fb_a_hi = 1'b0;
    assign fb_b_hi = 1'b0;
    // the previous addition is still in EX1: its sum is not complete
    // before the end of EX2
    assign in_ready = !(v0 && (dep_a || dep_b));
  end

  // EX1: lower half
  logic [HALF:0] add_lo;
  assign add_lo = {1'b0, op_a[HALF-1:0]} + {1'b0, op_b[HALF-1:0]};

  // EX2: upper half
  logic [UP-1:0] op_a_hi, op_b_hi, add_hi;
  assign op_a_hi = fb_a_hi ? s_hi2 : a_hi1;
  assign op_b_hi = fb_b_hi ? s_hi2 : b_hi1;
  assign add_hi  = op_a_hi + op_b_hi + UP'(c1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v0 <= 1'b0; v1 <= 1'b0; v2 <= 1'b0;
      a0 <= '0; b0 <= '0; da0 <= 1'b0; db0 <= 1'b0;
      s_lo1 <= '0; c1 <= 1'b0; a_hi1 <= '0; b_hi1 <= '0; da1 <= 1'b0; db1 <= 1'b0;
      s_lo2 <= '0; s_hi2 <= '0;
    end else begin
      v0 <= in_valid && in_ready;
      if (in_valid && in_ready) begin
        a0 <= a; b0 <= b; da0 <= dep_a; db0 <= dep_b;
      end
      v1 <= v0;
      if (v0) begin
        s_lo1 <= add_lo[HALF-1:0];
        c1    <= add_lo[HALF];
        a_hi1 <= op_a[WIDTH-1:HALF];
        b_hi1 <= op_b[WIDTH-1:HALF];
        da1   <= da0;
        db1   <= db0;
      end
      v2 <= v1;
      if (v1) begin
        s_lo2 <= s_lo1;
        s_hi2 <= add_hi;
      end
    end
  end

  assign out_valid = v2;
  assign sum       = {s_hi2, s_lo2};
endmodule
