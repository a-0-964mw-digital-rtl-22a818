// tb_data_mem: random reads and writes of a 1024 x 16 data memory against
// an array model; reads are combinational, writes take effect at the edge,
// and a disabled port reads zero.
module tb_data_mem;
  logic clk = 0, en, we;
  logic [9:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [1024];
  bit          known [1024];
  int checks = 0, failures = 0;

  data_mem #(.W(16), .DEPTH(1024)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 10'(i); wdata = 16'($urandom);
      model[i] = wdata; known[i] = 1;
    end
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      en = ($urandom % 8) != 0; we = 1'($urandom); addr = 10'($urandom); wdata = 16'($urandom);
      #1;
      if (!we) begin
        checks++;
        if (rdata != (en ? model[addr] : 16'd0)) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d got %h exp %h", addr, rdata, model[addr]);
        end
      end
      @(posedge clk);
      if (en && we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
