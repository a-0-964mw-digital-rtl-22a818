// fetch_unit: program counter, branches and the zero-overhead hardware loop
// that drives the loop cache.
//
// Every cycle one 160-bit bundle is fetched and executed (the processor has
// no pipeline: program memory, register files and data memories are read
// combinationally and written at the clock edge). The bundle comes from
// program memory, or from the loop cache while a cached loop runs a second
// or later pass; program memory is then not read at all.
//
// Control word of the bundle (evaluated with register values read before
// the bundle's own writes):
//   JMP tgt        pc = tgt
//   BNZ r, tgt     pc = tgt if R[r] != 0
//   BZ  r, tgt     pc = tgt if R[r] == 0
//   LOOP r, len    run the next len bundles R[r] times (R[r] = 0 or len = 0
//                  skips them); no control word inside the body takes effect
//   HALT           stop; done stays high until the next start
// A loop body of at most SIZE bundles is cached: on the first pass each
// bundle fetched from program memory is also written into the loop cache,
// later passes read it from there. The cache tag is the body's start
// address and length, so re-entering the same loop (an inner loop of a
// software outer loop) is served from the cache from its first pass on.
// Loops do not nest. start (while stopped) begins execution at address 0
// and empties the loop cache.
//
// The loop cache and its size are the design's; the control instructions,
// the hardware loop and the no-nesting rule are this implementation's.
module fetch_unit
  import hasip_pkg::*;
#(
  parameter int unsigned SIZE = LC_SIZE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             running,
  output logic             done,
  output logic [PM_AW-1:0] pc,
  output logic             pm_re,
  input  instr_t           pm_rdata,
  output instr_t           instr,
  input  word_t            ctrl_val,
  output logic             lc_hit,
  output logic             lc_fill
);
  localparam int unsigned AW = $clog2(SIZE);
  localparam int unsigned TW = PM_AW + PM_AW;

  logic [PM_AW-1:0] lp_start, lp_end;
  logic [DATA_W-1:0] lp_cnt;
  logic             lp_active, lp_cached, lp_hit;

  logic             lc_en, lc_we, lc_load, lc_setv, lc_valid;
  logic [TW-1:0]    lc_tag, new_tag;
  logic [AW-1:0]    lc_idx;
  logic [IW-1:0]    lc_rdata;

  logic [PM_AW-1:0] pc_n, lp_start_n, lp_end_n;
  logic [DATA_W-1:0] lp_cnt_n;
  logic             lp_active_n, lp_cached_n, lp_hit_n, running_n, done_n;
  logic             at_end;
  ctrl_t            c;

  assign lc_en   = running && lp_active && lp_cached;
  assign lc_we   = !lp_hit;
  assign lc_idx  = AW'(pc - lp_start);
  assign lc_hit  = lc_en && lp_hit;
  assign lc_fill = lc_en && !lp_hit;
  assign pm_re   = running && !lc_hit;
  assign instr   = lc_hit ? instr_t'(lc_rdata) : pm_rdata;
  assign at_end  = lp_active && (pc == lp_end);
  assign c       = instr.ctrl;
  assign new_tag = {pc + PM_AW'(1), c.tgt};

  loop_cache #(.W(IW), .SIZE(SIZE), .TW(TW)) u_lc (
    .clk, .rst_n,
    .en(lc_en), .we(lc_we), .idx(lc_idx), .wdata(pm_rdata), .rdata(lc_rdata),
    .load_tag(lc_load), .tag_in(new_tag), .set_valid(lc_setv),
    .flush(start && !running), .tag(lc_tag), .valid(lc_valid)
  );

  always_comb begin
    pc_n        = pc;
    lp_start_n  = lp_start;
    lp_end_n    = lp_end;
    lp_cnt_n    = lp_cnt;
    lp_active_n = lp_active;
    lp_cached_n = lp_cached;
    lp_hit_n    = lp_hit;
    running_n   = running;
    done_n      = done;
    lc_load     = 1'b0;
    lc_setv     = 1'b0;
    if (!running) begin
      if (start) begin
        pc_n        = '0;
        running_n   = 1'b1;
        done_n      = 1'b0;
        lp_active_n = 1'b0;
        lp_hit_n    = 1'b0;
      end
    end else if (at_end) begin
      if (lp_cached && !lp_hit) lc_setv = 1'b1;
      if (lp_cnt > 1) begin
        pc_n     = lp_start;
        lp_cnt_n = lp_cnt - 1'b1;
        lp_hit_n = lp_cached;
      end else begin
        pc_n        = pc + 1'b1;
        lp_active_n = 1'b0;
        lp_hit_n    = 1'b0;
      end
    end else if (lp_active) begin
      pc_n = pc + 1'b1;
    end else begin
      pc_n = pc + 1'b1;
      unique case (c.cop)
        C_JMP: pc_n = c.tgt;
        C_BNZ: if (ctrl_val != '0) pc_n = c.tgt;
        C_BZ:  if (ctrl_val == '0) pc_n = c.tgt;
        C_LOOP: begin
          if (c.tgt == '0 || ctrl_val == '0) begin
            pc_n = pc + c.tgt + 1'b1;
          end else begin
            lp_active_n = 1'b1;
            lp_start_n  = pc + 1'b1;
            lp_end_n    = pc + c.tgt;
            lp_cnt_n    = ctrl_val;
            lp_cached_n = (32'(c.tgt) <= SIZE);
            if (32'(c.tgt) <= SIZE) begin
              if (lc_valid && lc_tag == new_tag) begin
                lp_hit_n = 1'b1;
              end else begin
                lp_hit_n = 1'b0;
                lc_load  = 1'b1;
              end
            end else begin
              lp_hit_n = 1'b0;
            end
          end
        end
        C_HALT: begin
          pc_n      = pc;
          running_n = 1'b0;
          done_n    = 1'b1;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= '0;
      lp_start  <= '0;
      lp_end    <= '0;
      lp_cnt    <= '0;
      lp_active <= 1'b0;
      lp_cached <= 1'b0;
      lp_hit    <= 1'b0;
      running   <= 1'b0;
      done      <= 1'b0;
    end else begin
      pc        <= pc_n;
      lp_start  <= lp_start_n;
      lp_end    <= lp_end_n;
      lp_cnt    <= lp_cnt_n;
      lp_active <= lp_active_n;
      lp_cached <= lp_cached_n;
      lp_hit    <= lp_hit_n;
      running   <= running_n;
      done      <= done_n;
    end
  end

  // Rule of the loop instruction: a loop body carries no control words.
  a_no_ctrl_in_body: assert property (@(posedge clk) disable iff (!rst_n)
    running && lp_active |-> c.cop == C_NOP)
    else $error("control word inside a hardware loop body");
endmodule
