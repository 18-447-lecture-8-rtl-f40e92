// tb_staggered_adder: a new addition every cycle, with random dependence
// on the previous sum (through A, B or both) and random gaps. Each sum is
// compared with a model that keeps the last sum and adds in full width, and
// every result must appear exactly three edges after its operands (no stall
// for back-to-back dependent additions).
module tb_staggered_adder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, dep_a, dep_b, out_valid, in_ready;
  logic [31:0] a, b, sum;
  staggered_adder #(.WIDTH(32), .HALF(16)) dut (.*);
  int checks = 0, failures = 0, dep_back_to_back = 0;
  logic [31:0] last, expq [$];
  int due [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    in_valid = 0; a = 0; b = 0; dep_a = 0; dep_b = 0; last = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) != 0);
      a = $urandom(); b = $urandom();
      if (i % 5 == 0) begin a = 32'h0000_ffff; b = 32'h0000_0001; end   // carry across the halves
      dep_a = 1'($urandom()); dep_b = (i % 11 == 0) ? dep_a : 1'($urandom());
      #1;
      checks++; if (!in_ready) begin failures++; $display("FAIL in_ready low"); end
      if (in_valid) begin
        logic [31:0] oa, ob;
        oa = dep_a ? last : a;
        ob = dep_b ? last : b;
        last = oa + ob;
        expq.push_back(last);
        due.push_back(cyc + 3);
        if (dep_a || dep_b) dep_back_to_back++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d sums missing", expq.size()); end
    checks++; if (dep_back_to_back == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks += 2;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        logic [31:0] e;
        int d;
        e = expq.pop_front();
        d = due.pop_front();
        if (sum !== e) begin failures++; $display("FAIL sum %h exp %h", sum, e); end
        if (cyc != d) begin failures++; $display("FAIL latency at %0d exp %0d", cyc, d); end
      end
    end
  end
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
