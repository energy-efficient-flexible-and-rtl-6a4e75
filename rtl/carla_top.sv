// carla_top: CARLA, a reconfigurable low-energy convolution accelerator.
//
// NUM_CU convolution units (U+1 = 65 by default; CU #0..#63 have three PEs,
// the last CU has four, 196 PEs in all) share one input pipeline. Four DRAM
// read buses feed the array: Input #0 enters the pipeline (input features in
// 3x3 mode, filter weights in 1x1 mode) and Input #1..#3 are broadcast to all
// CUs, which load them into their PE registers one CU per cycle (weights in
// 3x3 mode, input features in 1x1 mode). The controller issues one
// micro-operation per cycle for CU #0; a register chain beside the pipeline
// hands it to CU #k k cycles later, together with PR<k>. Finished outputs go
// from the P banks to DRAM through the drain while the next pass is computed.
// An LFSR pruner lets the controller skip pseudo-randomly pruned filter rows.
//
// Interface: set `cfg` and pulse `start`; `done` pulses when the whole layer
// is in DRAM. The DRAM itself is outside: for each read bus the accelerator
// gives an enable and a word address and expects the word in the same cycle
// (a bus whose enable is low reads as zero); writes leave on four 16-bit lanes,
// each with its own address and valid bit. `ev` pulses once per cycle for each
// dataflow mechanism that acted (for monitoring and tests).
//
// Beside CARLA, and not connected to it, the top also carries one instance of
// the heterogeneous SRAM pair (hetero_sram_pair) proposed for the earlier
// row-wise accelerator: two private 448x32 partial-sum SRAMs and one shared
// 896x16 output SRAM for two neighbouring CUs. Its ports (prefix hs_) are
// brought straight out; see that module for their timing.
module carla_top
  import carla_pkg::*;
#(
  parameter int unsigned NUM_CU     = 65,
  parameter int unsigned BANK_DEPTH = 75,
  parameter int unsigned SEG [5]    = '{19, 84, 14, 16, 26},
  parameter int unsigned MAX_ROWS   = 32,
  parameter int unsigned FRAC       = 8,
  parameter int unsigned HS_DEPTH   = 448,
  localparam int unsigned HAW   = $clog2(HS_DEPTH),
  localparam int unsigned HPAW  = $clog2(2 * HS_DEPTH),
  localparam int unsigned NBANK = 3 * (NUM_CU - 1) + 4,
  localparam int unsigned BAW   = (BANK_DEPTH > 1) ? $clog2(BANK_DEPTH) : 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  cfg_t   cfg,
  output logic   busy,
  output logic   done,
  output logic   dram_rd_en    [4],
  output addr_t  dram_rd_addr  [4],
  input  word_t  dram_rd_data  [4],
  output logic   dram_wr_valid [4],
  output addr_t  dram_wr_addr  [4],
  output word_t  dram_wr_data  [4],
  output ev_t    ev,
  // heterogeneous SRAM pair (independent of CARLA)
  input  logic            hs_xfer,
  input  logic            hs_m_we    [2],
  input  logic [HAW-1:0]  hs_m_waddr [2],
  input  logic [31:0]     hs_m_wdata [2],
  input  logic            hs_m_re    [2],
  input  logic [HAW-1:0]  hs_m_raddr [2],
  output logic [31:0]     hs_m_rdata [2],
  input  logic            hs_p_we    [2],
  input  logic [HAW-1:0]  hs_p_waddr [2],
  input  logic [15:0]     hs_p_wdata [2],
  input  logic            hs_x_re    [2],
  input  logic [HPAW-1:0] hs_x_raddr [2],
  output logic [15:0]     hs_x_rdata [2]
);

  uop_t         uop, uop_nxt;
  cfg_t         cfg_q;
  logic [2:0]   pipe_sel;
  word_t        bus [4];
  word_t        pr  [NUM_CU];
  uop_t         ctrl_q   [NUM_CU];
  uop_t         ctrl_nxt [NUM_CU];
  logic         prune_restart, prune_advance, prune_keep;
  logic [15:0]  prune_value;
  logic         drain_start, drain_busy, p_rd_en;
  drain_t       drain_info;
  logic [BAW:0] drain_n_addr;
  logic [BAW-1:0] p_rd_addr;
  word_t        p_data [NBANK];

  for (genvar b = 0; b < 4; b++) begin : g_bus
    assign bus[b] = dram_rd_en[b] ? dram_rd_data[b] : word_t'(0);
  end

  carla_controller #(
    .NUM_CU(NUM_CU), .BANK_DEPTH(BANK_DEPTH), .SEG(SEG), .MAX_ROWS(MAX_ROWS)
  ) u_ctrl (
    .clk, .rst_n, .start, .cfg, .cfg_q, .busy, .done,
    .uop, .uop_nxt, .pipe_sel,
    .rd_en(dram_rd_en), .rd_addr(dram_rd_addr),
    .prune_restart, .prune_advance, .prune_keep,
    .drain_start, .drain_info, .drain_n_addr, .drain_busy,
    .ev
  );

  carla_lfsr_pruner u_prune (
    .clk, .rst_n,
    .enable(cfg_q.prune_en), .restart(prune_restart),
    .seed(cfg_q.prune_seed), .thresh(cfg_q.prune_thresh),
    .advance(prune_advance), .value(prune_value), .keep(prune_keep)
  );

  carla_input_pipeline #(.NUM_CU(NUM_CU), .SEG(SEG)) u_pipe (
    .clk, .rst_n, .in0(bus[0]), .sel(pipe_sel), .pr
  );

  // control pipeline: CU #k sees the micro-operation of CU #0 k cycles later
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < NUM_CU; k++) ctrl_q[k] <= UOP_NOP;
    end else begin
      for (int k = 1; k < NUM_CU; k++) ctrl_q[k] <= ctrl_q[k-1];
    end
  end
  assign ctrl_q[0] = uop;

  for (genvar k = 0; k < NUM_CU; k++) begin : g_cu
    localparam int unsigned NPE = (k == NUM_CU - 1) ? 4 : 3;
    word_t p_rd_data [NPE];

    if (k == 0) begin : g_n0
      assign ctrl_nxt[k] = uop_nxt;
    end else begin : g_nk
      assign ctrl_nxt[k] = ctrl_q[k-1];
    end

    carla_cu #(.NPE(NPE), .BANK_DEPTH(BANK_DEPTH), .FRAC(FRAC)) u_cu (
      .clk, .rst_n,
      .ctrl(ctrl_q[k]), .ctrl_nxt(ctrl_nxt[k]),
      .pr(pr[k]), .bus(bus),
      .p_rd_en, .p_rd_addr, .p_rd_data
    );

    for (genvar i = 0; i < NPE; i++) begin : g_p
      assign p_data[3 * k + i] = p_rd_data[i];
    end
  end

  carla_drain #(.NUM_CU(NUM_CU), .BANK_DEPTH(BANK_DEPTH)) u_drain (
    .clk, .rst_n,
    .start(drain_start), .info(drain_info), .n_addr(drain_n_addr), .busy(drain_busy),
    .p_rd_en, .p_rd_addr, .p_data,
    .wr_valid(dram_wr_valid), .wr_addr(dram_wr_addr), .wr_data(dram_wr_data)
  );

  hetero_sram_pair #(.DEPTH(HS_DEPTH), .PW(32), .OW(16)) u_hs (
    .clk, .xfer(hs_xfer),
    .m_we(hs_m_we), .m_waddr(hs_m_waddr), .m_wdata(hs_m_wdata),
    .m_re(hs_m_re), .m_raddr(hs_m_raddr), .m_rdata(hs_m_rdata),
    .p_we(hs_p_we), .p_waddr(hs_p_waddr), .p_wdata(hs_p_wdata),
    .x_re(hs_x_re), .x_raddr(hs_x_raddr), .x_rdata(hs_x_rdata)
  );

endmodule
