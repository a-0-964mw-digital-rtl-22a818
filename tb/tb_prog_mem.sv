// tb_prog_mem: loads a 256 x 160 program memory through its write port and
// reads it back at random addresses; rdata is zero while re is low.
module tb_prog_mem;
  logic clk = 0, we, re;
  logic [7:0] waddr, raddr;
  logic [159:0] wdata, rdata;
  logic [159:0] model [256];
  int checks = 0, failures = 0;

  prog_mem #(.W(160), .DEPTH(256)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i);
      wdata = {$urandom, $urandom, $urandom, $urandom, $urandom};
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      re = ($urandom % 4) != 0; raddr = 8'($urandom);
      #1;
      checks++;
      if (rdata != (re ? model[raddr] : 160'd0)) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d", raddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
