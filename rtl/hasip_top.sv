// hasip_top: the hearing-aid ASIP, a 16-bit 3-issue VLIW processor with a
// 160-bit instruction word, a 32-entry loop cache, two register files of
// 16 x 16 bits, four 40-bit accumulators, a main and a local data memory
// with one load/store unit each, and the custom function units of the
// hearing-aid kernels in every issue slot.
//
// Operation: the host loads the program through the pm_* port and the
// input data through the host_dm_* port while the processor is stopped,
// pulses start, waits for done, and reads results back through host_dm_*.
// The processor executes one bundle per cycle (no pipeline: every unit is
// combinational between the register and memory state, which is written
// at the clock edge), so a program's cycle count is the number of bundles
// it executes. cycles counts the cycles of the current or last run; pm_fetch
// is high in every cycle program memory is read, and lc_hit in every cycle
// the bundle comes from the loop cache instead, lc_fill while the cache is
// being filled.
//
// Register numbers 0-15 live in register file A, 16-31 in register file B.
// Slot 0 loads from and stores to the main data memory, slot 1 the local
// data memory; slot 2 has no load/store unit. Two writes to one register
// in the same bundle are a program error (the higher slot wins).
//
// Data width, issue width, instruction width, register files, 40-bit
// registers, two data memories and the 32-entry loop cache follow the
// design; the instruction set, the single-cycle execution, memory depths,
// unit allocation and the host interface are this implementation's choices.
module hasip_top
  import hasip_pkg::*;
#(
  parameter int unsigned LC_ENTRIES = LC_SIZE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  logic             pm_we,
  input  logic [PM_AW-1:0] pm_waddr,
  input  logic [IW-1:0]    pm_wdata,
  input  logic             host_dm_sel,
  input  logic             host_dm_en,
  input  logic             host_dm_we,
  input  logic [DM_AW-1:0] host_dm_addr,
  input  word_t            host_dm_wdata,
  output word_t            host_dm_rdata,
  output logic             pm_fetch,
  output logic             lc_hit,
  output logic             lc_fill,
  output logic [31:0]      cycles
);
  localparam int unsigned NRD = 3 * ISSUE + 1;
  localparam int unsigned NWR = 2 * ISSUE;

  logic [PM_AW-1:0] pc;
  instr_t           pm_rdata, instr;
  logic             pm_re;

  prog_mem #(.W(IW), .DEPTH(PM_DEPTH)) u_pm (
    .clk, .we(pm_we && !busy), .waddr(pm_waddr), .wdata(pm_wdata),
    .re(pm_re), .raddr(pc), .rdata(pm_rdata)
  );

  word_t ctrl_val;

  fetch_unit #(.SIZE(LC_ENTRIES)) u_fetch (
    .clk, .rst_n, .start, .running(busy), .done, .pc, .pm_re,
    .pm_rdata, .instr, .ctrl_val, .lc_hit, .lc_fill
  );

  assign pm_fetch = pm_re;

  // ---------------- register files ----------------
  logic [NRD-1:0][4:0]  raddr;
  logic [NRD-1:0][3:0]  raddr_lo;
  logic [NRD-1:0][15:0] rd_a, rd_b;
  word_t                rval [NRD];
  logic [NWR-1:0]       we_a, we_b;
  logic [NWR-1:0][3:0]  waddr_lo;
  logic [NWR-1:0][15:0] wdata;
  rf_wr_t               wr [NWR];

  always_comb begin
    for (int i = 0; i < ISSUE; i++) begin
      raddr[3*i]   = instr.slot[i].s1;
      raddr[3*i+1] = instr.slot[i].s2;
      raddr[3*i+2] = instr.slot[i].imm[21:17];
    end
    raddr[NRD-1] = instr.ctrl.r;
    for (int r = 0; r < NRD; r++) raddr_lo[r] = raddr[r][3:0];
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) rval[r] = raddr[r][4] ? rd_b[r] : rd_a[r];
  end

  always_comb begin
    for (int p = 0; p < NWR; p++) begin
      we_a[p]     = busy && wr[p].en && !wr[p].addr[4];
      we_b[p]     = busy && wr[p].en &&  wr[p].addr[4];
      waddr_lo[p] = wr[p].addr[3:0];
      wdata[p]    = wr[p].data;
    end
  end

  assign ctrl_val = rval[NRD-1];

  register_file #(.W(DATA_W), .DEPTH(RF_DEPTH), .NR(NRD), .NW(NWR)) u_rf_a (
    .clk, .rst_n, .raddr(raddr_lo), .rdata(rd_a), .we(we_a), .waddr(waddr_lo), .wdata
  );
  register_file #(.W(DATA_W), .DEPTH(RF_DEPTH), .NR(NRD), .NW(NWR)) u_rf_b (
    .clk, .rst_n, .raddr(raddr_lo), .rdata(rd_b), .we(we_b), .waddr(waddr_lo), .wdata
  );

  // ---------------- accumulators ----------------
  logic [2*ISSUE-1:0][1:0]     acc_ra;
  logic [2*ISSUE-1:0][ACC_W-1:0] acc_rd;
  logic [ISSUE-1:0]            acc_we;
  logic [ISSUE-1:0][1:0]       acc_wa;
  logic [ISSUE-1:0][ACC_W-1:0] acc_wd;
  acc_wr_t                     aw [ISSUE];

  always_comb begin
    for (int i = 0; i < ISSUE; i++) begin
      acc_ra[2*i]   = instr.slot[i].s1[1:0];
      acc_ra[2*i+1] = instr.slot[i].d1[1:0];
      acc_we[i]     = busy && aw[i].en;
      acc_wa[i]     = aw[i].addr;
      acc_wd[i]     = aw[i].data;
    end
  end

  acc_file #(.W(ACC_W), .NACC(NACC), .NR(2*ISSUE), .NW(ISSUE)) u_acc (
    .clk, .rst_n, .raddr(acc_ra), .rdata(acc_rd), .we(acc_we), .waddr(acc_wa), .wdata(acc_wd)
  );

  // ---------------- issue slots ----------------
  dm_req_t mreq [ISSUE];
  word_t   mrd  [ISSUE];

  for (genvar i = 0; i < ISSUE; i++) begin : g_slot
    issue_slot #(.HAS_LSU(i < 2)) u_slot (
      .s(instr.slot[i]), .a(rval[3*i]), .b(rval[3*i+1]), .c(rval[3*i+2]),
      .acc_s(acc_rd[2*i]), .acc_d(acc_rd[2*i+1]), .mem_rdata(mrd[i]),
      .w1(wr[2*i]), .w2(wr[2*i+1]), .aw(aw[i]), .mreq(mreq[i])
    );
  end

  // ---------------- data memories ----------------
  dm_req_t dm_req [2];
  word_t   dm_rd  [2];

  always_comb begin
    for (int m = 0; m < 2; m++) begin
      if (busy) begin
        dm_req[m] = mreq[m];
      end else begin
        dm_req[m].en    = host_dm_en && (host_dm_sel == m[0]);
        dm_req[m].we    = host_dm_we;
        dm_req[m].addr  = host_dm_addr;
        dm_req[m].wdata = host_dm_wdata;
      end
    end
  end

  always_comb begin
    mrd[0] = dm_rd[0];
    mrd[1] = dm_rd[1];
    mrd[2] = '0;
    host_dm_rdata = host_dm_sel ? dm_rd[1] : dm_rd[0];
  end

  for (genvar m = 0; m < 2; m++) begin : g_dm
    data_mem #(.W(DATA_W), .DEPTH(DM_DEPTH)) u_dm (
      .clk, .en(dm_req[m].en), .we(dm_req[m].we), .addr(dm_req[m].addr),
      .wdata(dm_req[m].wdata), .rdata(dm_rd[m])
    );
  end

  // ---------------- run cycle counter ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                cycles <= '0;
    else if (start && !busy)   cycles <= '0;
    else if (busy)             cycles <= cycles + 1'b1;
  end

  // ---------------- program rules ----------------
  logic wr_conflict;
  always_comb begin
    wr_conflict = 1'b0;
    for (int p = 0; p < NWR; p++)
      for (int q = p + 1; q < NWR; q++)
        if (wr[p].en && wr[q].en && wr[p].addr == wr[q].addr) wr_conflict = 1'b1;
  end

  a_no_wr_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !wr_conflict)
    else $error("two writes to one register in a bundle");

  a_no_lsu_slot2: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(instr.slot[2].op inside {OP_LD, OP_ST}))
    else $error("load/store issued on slot 2");
endmodule
