// tb_adder_unstaggered: the two-stage adder with and without staggered
// feedback, side by side.
//  1. Random stream on the unstaggered adder (STAGGER=0): each addition is
//     held until accepted. Every sum is compared with a full-width model,
//     every result must appear three edges after acceptance, and in_ready
//     must be low exactly when a dependent addition is presented in the
//     cycle right after the previous addition was accepted.
//  2. A chain of 50 additions, each using the previous sum, on both adders:
//     the staggered one delivers a sum every cycle (50 cycles from first to
//     last), the unstaggered one every other cycle (99 cycles): one lost
//     cycle per dependent pair, the cost of splitting a stage without
//     staggering.
//  3. 50 independent additions: both adders take one per cycle.
module tb_adder_unstaggered;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, dep_a, dep_b;
  logic [31:0] a, b;
  logic        p_ready, p_out_valid, s_ready, s_out_valid;
  logic [31:0] p_sum, s_sum;
  logic        s_in_valid, s_dep_a, s_dep_b;
  logic [31:0] s_a, s_b;

  staggered_adder #(.WIDTH(32), .HALF(16), .STAGGER(1'b0)) dut_p (
    .clk, .rst_n, .in_valid, .a, .b, .dep_a, .dep_b,
    .in_ready(p_ready), .out_valid(p_out_valid), .sum(p_sum)
  );
  staggered_adder #(.WIDTH(32), .HALF(16), .STAGGER(1'b1)) dut_s (
    .clk, .rst_n, .in_valid(s_in_valid), .a(s_a), .b(s_b), .dep_a(s_dep_a), .dep_b(s_dep_b),
    .in_ready(s_ready), .out_valid(s_out_valid), .sum(s_sum)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected results of the unstaggered adder, with their due cycle
  logic [31:0] p_exp [$], s_exp [$];
  int          p_due [$];
  int          p_first = -1, p_last = -1, s_first = -1, s_last = -1;
  always @(posedge clk) begin
    if (rst_n && p_out_valid) begin
      logic [31:0] e;
      int d;
      if (p_exp.size() == 0) check(0, "unstaggered: unexpected output");
      else begin
        e = p_exp.pop_front();
        d = p_due.pop_front();
        check(p_sum == e, $sformatf("unstaggered sum %h exp %h", p_sum, e));
        check(cyc == d, $sformatf("unstaggered latency: at %0d exp %0d", cyc, d));
      end
      if (p_first < 0) p_first = cyc;
      p_last = cyc;
    end
    if (rst_n && s_out_valid) begin
      logic [31:0] e;
      if (s_exp.size() == 0) check(0, "staggered: unexpected output");
      else begin
        e = s_exp.pop_front();
        check(s_sum == e, $sformatf("staggered sum %h exp %h", s_sum, e));
      end
      if (s_first < 0) s_first = cyc;
      s_last = cyc;
    end
  end

  logic [31:0] p_last_sum, s_last_sum;
  int stalls = 0, dep_pairs = 0;

  initial begin
    bit accepted_prev, held;
    in_valid = 0; s_in_valid = 0; a = 0; b = 0; dep_a = 0; dep_b = 0;
    s_a = 0; s_b = 0; s_dep_a = 0; s_dep_b = 0;
    p_last_sum = 0; s_last_sum = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1. random stream on the unstaggered adder
    accepted_prev = 0; held = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (!held) begin   // previous one accepted (or none): present a new one
        in_valid = ($urandom_range(0, 5) != 0);
        a = $urandom(); b = $urandom();
        if (i % 7 == 0) begin a = 32'h0000_ffff; b = 32'h0000_0001; end
        dep_a = 1'($urandom()); dep_b = 1'($urandom_range(0, 3) == 0);
      end
      #1;
      check(p_ready == !((dep_a || dep_b) && accepted_prev),
            $sformatf("in_ready %0b at step %0d (valid %0b dep %0b%0b prev %0b v0 %0b)", p_ready, i, in_valid, dep_a, dep_b, accepted_prev, dut_p.v0));
      check(s_ready, "staggered adder always ready");
      if (in_valid && p_ready) begin
        logic [31:0] oa, ob;
        oa = dep_a ? p_last_sum : a;
        ob = dep_b ? p_last_sum : b;
        p_last_sum = oa + ob;
        p_exp.push_back(p_last_sum);
        p_due.push_back(cyc + 3);
        if ((dep_a || dep_b) && accepted_prev) dep_pairs++;
      end
      if (in_valid && !p_ready) stalls++;
      accepted_prev = in_valid && p_ready;
      held          = in_valid && !p_ready;
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    check(p_exp.size() == 0, $sformatf("unstaggered: %0d sums missing", p_exp.size()));
    check(stalls > 0, "unstaggered adder stalled at least once");
    $display("random stream: %0d refused cycles", stalls);

    // 2. dependent chain of 50 on both adders
    p_first = -1; s_first = -1;
    fork
      begin   // unstaggered: hold each addition until accepted
        for (int i = 0; i < 50; i++) begin
          @(negedge clk);
          in_valid = 1; a = 32'h0001_8001 * (i + 1); b = 32'h7fff; dep_a = (i > 0); dep_b = 0;
          #1;
          while (!p_ready) begin @(negedge clk); #1; end
          p_last_sum = (dep_a ? p_last_sum : a) + b;
          p_exp.push_back(p_last_sum);
          p_due.push_back(cyc + 3);
        end
        @(negedge clk); in_valid = 0;
      end
      begin   // staggered: one per cycle, same operands
        for (int i = 0; i < 50; i++) begin
          @(negedge clk);
          s_in_valid = 1; s_a = 32'h0001_8001 * (i + 1); s_b = 32'h7fff; s_dep_a = (i > 0); s_dep_b = 0;
          s_last_sum = ((i > 0) ? s_last_sum : 32'h0001_8001) + 32'h7fff;
          s_exp.push_back(s_last_sum);
        end
        @(negedge clk); s_in_valid = 0;
      end
    join
    repeat (6) @(negedge clk);
    check(p_exp.size() == 0 && s_exp.size() == 0, "chain: all sums delivered");
    check(s_last - s_first == 49, $sformatf("staggered chain of 50: %0d cycles exp 50", s_last - s_first + 1));
    check(p_last - p_first == 98, $sformatf("unstaggered chain of 50: %0d cycles exp 99", p_last - p_first + 1));
    $display("chain of 50 dependent additions: staggered %0d cycles, unstaggered %0d cycles",
             s_last - s_first + 1, p_last - p_first + 1);

    // 3. independent additions: both one per cycle
    p_first = -1; s_first = -1;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      in_valid = 1; s_in_valid = 1; a = $urandom(); b = $urandom(); dep_a = 0; dep_b = 0;
      s_a = a; s_b = b; s_dep_a = 0; s_dep_b = 0;
      #1;
      check(p_ready, "independent addition accepted at once");
      p_last_sum = a + b; s_last_sum = a + b;
      p_exp.push_back(p_last_sum); p_due.push_back(cyc + 3);
      s_exp.push_back(s_last_sum);
    end
    @(negedge clk); in_valid = 0; s_in_valid = 0;
    repeat (6) @(negedge clk);
    check(p_last - p_first == 49 && s_last - s_first == 49, "independent: 50 sums in 50 cycles on both");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
