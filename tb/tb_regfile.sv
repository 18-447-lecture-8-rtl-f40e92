// tb_regfile: writes and reads against a shadow array, x0 stays zero, and
// the internal forward: with WRITE_THROUGH=0 a read of the register being
// written returns the old value, with WRITE_THROUGH=1 the new one.
module tb_regfile;
  import rv_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  reg_idx_t ra1, ra2, ra3, wa;
  word_t rd1 [2], rd2 [2], rd3 [2];
  logic [1:0] hit [2];
  logic we;
  word_t wd;
  regfile #(.WRITE_THROUGH(1'b0)) u_plain (.clk, .ra1, .ra2, .ra3, .rd1(rd1[0]), .rd2(rd2[0]), .rd3(rd3[0]),
                                         .we, .wa, .wd, .bypass_hit(hit[0]));
  regfile #(.WRITE_THROUGH(1'b1)) u_wt    (.clk, .ra1, .ra2, .ra3, .rd1(rd1[1]), .rd2(rd2[1]), .rd3(rd3[1]),
                                         .we, .wa, .wd, .bypass_hit(hit[1]));
  word_t shadow [32];
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    // initialise every register
    for (int r = 0; r < 32; r++) begin
      @(negedge clk); we = 1; wa = 5'(r); wd = $urandom(); shadow[r] = (r == 0) ? 0 : wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom()); wa = 5'($urandom()); wd = $urandom();
      ra1 = (i % 4 == 0) ? wa : 5'($urandom()); ra2 = 5'($urandom()); ra3 = 5'($urandom());
      #1;
      chk(rd1[0] == shadow[ra1] && rd2[0] == shadow[ra2] && rd3[0] == shadow[ra3], "plain read");
      chk(hit[0] == 2'b00, "plain never bypasses");
      chk(rd1[1] == ((we && wa == ra1 && ra1 != 0) ? wd : shadow[ra1]), $sformatf("write-through port1 ra=%0d", ra1));
      chk(hit[1][0] == (we && wa == ra1 && ra1 != 0), "bypass flag");
      chk(rd2[1] == ((we && wa == ra2 && ra2 != 0) ? wd : shadow[ra2]), "write-through port2");
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    @(negedge clk); we = 1; wa = 0; wd = 32'hdead_beef; ra1 = 0;
    @(negedge clk); we = 0; #1;
    chk(rd1[0] == 0 && rd1[1] == 0, "x0 reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
