// tb_register_file: random multi-port writes and reads of a 16 x 16
// register file with 10 read and 6 write ports against an array model,
// including same-cycle conflicts (highest port wins), read-before-write
// timing and reset to zero.
module tb_register_file;
  localparam int NR = 10, NW = 6;
  logic clk = 0, rst_n = 0;
  logic [NR-1:0][3:0]  raddr;
  logic [NR-1:0][15:0] rdata;
  logic [NW-1:0]       we;
  logic [NW-1:0][3:0]  waddr;
  logic [NW-1:0][15:0] wdata;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  register_file #(.W(16), .DEPTH(16), .NR(NR), .NW(NW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; raddr = '0; waddr = '0; wdata = '0;
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1;
    for (int r = 0; r < NR; r++) raddr[r] = 4'(r);
    #1;
    for (int r = 0; r < NR; r++) begin checks++; if (rdata[r] != 0) failures++; end
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        we[p] = 1'($urandom); waddr[p] = 4'($urandom); wdata[p] = 16'($urandom);
      end
      for (int r = 0; r < NR; r++) raddr[r] = 4'($urandom);
      #1;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (rdata[r] != model[raddr[r]]) begin
          failures++;
          if (failures < 10) $display("FAIL cyc %0d port %0d", cyc, r);
        end
      end
      @(posedge clk);
      for (int p = 0; p < NW; p++) if (we[p]) model[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
