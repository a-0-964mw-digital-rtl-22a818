// tb_loop_cache: fills the 32-entry loop cache, reads it back, and checks
// the tag and valid protocol (load_tag clears valid, set_valid sets it,
// flush clears it, flush has priority).
module tb_loop_cache;
  logic clk = 0, rst_n = 0, en, we, load_tag, set_valid, flush, valid;
  logic [4:0] idx;
  logic [159:0] wdata, rdata;
  logic [15:0] tag_in, tag;
  logic [159:0] model [32];
  int checks = 0, failures = 0;

  loop_cache #(.W(160), .SIZE(32), .TW(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; load_tag = 0; set_valid = 0; flush = 0; idx = 0; wdata = 0; tag_in = 0;
    #12 rst_n = 1;
    #1 chk(!valid, "valid after reset");
    @(negedge clk); load_tag = 1; tag_in = 16'h1234;
    @(negedge clk); load_tag = 0;
    chk(tag == 16'h1234 && !valid, "tag loaded, not valid");
    for (int i = 0; i < 32; i++) begin
      en = 1; we = 1; idx = 5'(i);
      wdata = {$urandom, $urandom, $urandom, $urandom, $urandom};
      model[i] = wdata;
      @(negedge clk);
    end
    set_valid = 1; en = 0;
    @(negedge clk); set_valid = 0;
    chk(valid, "valid after set_valid");
    for (int k = 0; k < 200; k++) begin
      en = 1; we = 0; idx = 5'($urandom);
      #1 chk(rdata == model[idx], "read back");
      @(negedge clk);
    end
    en = 0; #1 chk(rdata == '0, "idle port reads zero");
    load_tag = 1; tag_in = 16'h0042;
    @(negedge clk); load_tag = 0;
    chk(!valid && tag == 16'h0042, "new tag clears valid");
    set_valid = 1; @(negedge clk); set_valid = 0;
    flush = 1; set_valid = 1; @(negedge clk); flush = 0; set_valid = 0;
    chk(!valid, "flush wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
