// carla_controller: sequencer of the CARLA accelerator.
//
// The controller walks through a convolutional layer pass by pass. A pass is
// one group of filters (NUM_CU filters in 3x3 mode, NUM_CU-1 in 1x1 mode)
// applied to one partition of the out-fmaps (part_rows output rows in 3x3
// mode, one pixel per PE in 1x1 mode). Every cycle it issues one
// micro-operation for CU #0 (uop, registered) together with the DRAM fetch
// and the pipeline multiplexer setting that put the matching operand into
// PR0 at the same clock edge. The micro-operation then travels down the CU
// chain with the data. A second sequencer, the loader, drives the broadcast
// buses Input #1..#3 (and #0) with the operands of CU #k k+1 cycles after a
// micro-operation with `load` set, so each CU loads its registers exactly when
// the load reaches it.
//
// 3x3 mode (serial accumulation, row-wise). For each input channel the three
// filter rows are applied in three steps; step f streams the input rows
// o_lo+f-1 .. o_hi+f-1 (rows in the zero padding are skipped), one feature
// per cycle, row after row without gaps. M0 zeroes product 0 on the last
// column and M2 product 2 on the first, so padded columns cost no cycles.
// The last column of a row is completed in the cycle after its last feature,
// which is the first feature of the next row. When a step follows the
// previous one directly, the weights of the new filter row are loaded in the
// last cycle of the old step and no cycle is lost. Rows that step f+1 shares
// with step f are re-injected from the pipeline feedback when the distance
// between the two uses, (rows-1)*W, equals one of the feedback tap delays;
// otherwise they are fetched again. A step that cannot follow directly
// (pruned or empty steps in between, loader busy, P banks still draining)
// costs one bubble per skipped step and one preload cycle.
//
// 1x1 mode. Per input channel: one load cycle, in which all CUs get NPE
// input features in turn (three per CU; the last CU takes four and uses
// Input #0 too, so no weight can enter the pipeline in that cycle), then
// NUM_CU-1 cycles that each push one filter weight into the pipeline.
//
// 1x1 mode for small in-fmaps (OL^2 <= NUM_CU-1 pixels, e.g. 7x7). The roles
// swap back: every PE holds the weight of its own filter (196 filters per
// pass, three per CU and four in the last), loaded by the loader once per
// channel, and the OL^2 input features of the channel stream through the
// pipeline; PE i of CU k accumulates output pixel p of its filter at address
// p. A channel takes NUM_CU cycles (the loader's pace), each weight is read
// once per layer and the in-fmap once per group of 196 filters.
//
// Pruning. The LFSR pruner gives one keep/prune decision per filter row (3x3)
// or per channel (1x1), restarted from the seed for every pass. A pruned row
// of any channel but the last is skipped. Rows of the last channel are always
// run (with zero weights, which are not fetched) so that every output reaches
// its P bank; this costs at most one channel of time.
//
// Pass end: after the last writes have reached the last CU, the drain is
// started for the P banks. The last channel of the next pass (the only one
// that writes P) waits until the drain has finished.
//
// Constraints: 3x3 mode assumes stride 1, zero padding 1, W = IL = OL >= 4,
// part_rows*W <= 3*BANK_DEPTH and part_rows <= MAX_ROWS. 1x1 mode supports
// stride 1 and 2 and OL >= 4. The small-in-fmap mode needs stride 1 and
// OL^2 <= min(NUM_CU-1, BANK_DEPTH). The dataflows, cycle counts and the pipelined
// control follow the design description; the state machine, the loader, the
// DRAM layouts and the pruning rule for the last channel are this
// implementation's choices.
module carla_controller
  import carla_pkg::*;
#(
  parameter int unsigned NUM_CU     = 65,
  parameter int unsigned BANK_DEPTH = 75,
  parameter int unsigned SEG [5]    = '{19, 84, 14, 16, 26},
  parameter int unsigned MAX_ROWS   = 32,
  localparam int unsigned BAW     = (BANK_DEPTH > 1) ? $clog2(BANK_DEPTH) : 1,
  localparam int unsigned NPE_TOT = 3 * (NUM_CU - 1) + 4,
  localparam int unsigned KW      = (NUM_CU > 1) ? $clog2(NUM_CU) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  cfg_t          cfg,
  output cfg_t          cfg_q,     // configuration latched at start
  output logic          busy,
  output logic          done,
  // micro-operation for CU #0 (uop) and its next value (uop_nxt)
  output uop_t          uop,
  output uop_t          uop_nxt,
  // pipeline input multiplexer (0: Input #0, t: feedback tap t-1)
  output logic [2:0]    pipe_sel,
  // DRAM read buses Input #0..#3 (data is expected in the same cycle)
  output logic          rd_en   [4],
  output addr_t         rd_addr [4],
  // pruner
  output logic          prune_restart,
  output logic          prune_advance,
  input  logic          prune_keep,
  // output drain
  output logic          drain_start,
  output drain_t        drain_info,
  output logic [BAW:0]  drain_n_addr,
  input  logic          drain_busy,
  output ev_t           ev
);

  localparam int unsigned U = NUM_CU - 1;

  typedef enum logic [3:0] {
    S_IDLE, S_PASS, S_SKIP, S_PRE, S_RUN, S_FLUSH, S_LOAD, S_MAC, S_END, S_FIN
  } state_e;

  state_e state;
  cfg_t   c;

  // pass
  logic [CHW-1:0]  g_base;      // first filter of the pass
  int              o_lo, o_hi;  // 3x3: output rows of the partition
  logic [17:0]     pix_base;    // 1x1: first pixel of the partition
  logic [DIMW-1:0] prow0, pcol0;
  // walk
  logic [CHW-1:0]  ch;
  logic [1:0]      f;
  int              r, j;
  logic [KW-1:0]   m;
  logic            at_start, cur_first, step_fb, pre_zero, chan_first, zero_ch, any_done;
  logic [MAX_ROWS-1:0] row_started;
  logic            pend_v, pend_p;
  logic [IDXW-1:0] pend_idx;
  int              end_cnt;
  // loader
  logic            wl_act, wl_zero;
  mode_e           wl_mode;
  logic [KW-1:0]   wl_k;
  logic [CHW-1:0]  wl_ch;
  logic [1:0]      wl_f;
  logic [DIMW-1:0] wl_row, wl_col;

  // ---------------- helpers ----------------
  function automatic int tap_delay(int unsigned t);
    int d;
    d = int'(NUM_CU);
    for (int unsigned i = 0; i < 5; i++)
      if (i < t) d += int'(SEG[i]);
    return d;
  endfunction

  int W, IL, IC, MAC_N;
  assign MAC_N = (c.mode == MODE_1X1S) ? int'(c.ol) * int'(c.ol) : int'(U);
  assign W  = int'(c.ol);
  assign IL = int'(c.il);
  assign IC = int'(c.ic);

  function automatic int step_lo(int ff);
    int v;
    v = o_lo + ff - 1;
    return (v < 0) ? 0 : v;
  endfunction
  function automatic int step_hi(int ff);
    int v;
    v = o_hi + ff - 1;
    return (v > IL - 1) ? IL - 1 : v;
  endfunction

  // filters per pass
  function automatic int unsigned group_size(mode_e md);
    case (md)
      MODE_3X3:  return NUM_CU;
      MODE_1X1S: return NPE_TOT;
      default:   return U;
    endcase
  endfunction

  // feedback tap whose delay equals (rows-1)*W, 0 if none
  logic [2:0] tap_sel;
  always_comb begin
    tap_sel = '0;
    for (int t = 0; t < 6; t++)
      if (tap_delay(t) == (o_hi - o_lo) * W) tap_sel = 3'(t + 1);
  end

  // loader can accept a new load issued in this cycle
  logic wl_ok;
  assign wl_ok = !wl_act || (int'(wl_k) == NUM_CU - 1);

  // candidate next 3x3 step after (ch, f) and 1x1 channel after ch
  int   cand_ch, cand_f, cand_lo, cand_hi;
  logic cand_ex, cand_exec, cand_last;
  always_comb begin
    if (c.mode == MODE_3X3) begin
      if (at_start)  begin cand_ch = 0;        cand_f = 0;          end
      else if (f < 2) begin cand_ch = int'(ch); cand_f = int'(f) + 1; end
      else           begin cand_ch = int'(ch) + 1; cand_f = 0;       end
    end else begin
      cand_ch = at_start ? 0 : int'(ch) + 1;
      cand_f  = 0;
    end
    cand_lo   = step_lo(cand_f);
    cand_hi   = step_hi(cand_f);
    cand_ex   = cand_ch < IC;
    cand_last = cand_ch == IC - 1;
    cand_exec = cand_ex && (c.mode != MODE_3X3 || cand_lo <= cand_hi) &&
                (prune_keep || cand_last);
  end

  // ---------------- micro-operation, fetch and state update ----------------
  logic  p_en0;
  addr_t p_addr0;
  logic  ld_en   [4];
  addr_t ld_addr [4];
  int   o_loc, base;
  logic go_seam, fb_use, fin_group, fin_part;

  always_comb begin
    o_loc = r - int'(f) + 1 - o_lo;
    base  = o_loc * W;
    fb_use = step_fb && (tap_sel != 0) && (f != 0) && (r <= step_hi(int'(f) - 1));
    go_seam = cand_exec && wl_ok && (!cand_last || !drain_busy);
  end

  always_comb begin
    uop_nxt       = UOP_NOP;
    uop_nxt.mode  = c.mode;
    pipe_sel      = '0;
    p_en0         = 1'b0;
    p_addr0       = '0;
    prune_advance = 1'b0;
    prune_restart = (state == S_PASS);
    ev            = '0;
    case (state)
      S_SKIP: begin
        if (cand_ex && !cand_exec) begin
          prune_advance = 1'b1;
          ev.skip       = 1'b1;
        end else if (cand_exec && wl_ok && (!cand_last || !drain_busy)) begin
          prune_advance = 1'b1;
        end else if (cand_exec) begin
          ev.drain_wait = cand_last && drain_busy;
        end
      end
      S_PRE: begin
        uop_nxt.load    = 1'b1;
        uop_nxt.en_acc0 = 1'b1;
        uop_nxt.zero_m0 = 1'b1;
        uop_nxt.first   = !row_started[o_loc];
        uop_nxt.rd      = row_started[o_loc];
        uop_nxt.rd_idx  = IDXW'(base);
        if (pend_v) begin
          uop_nxt.zero_m2 = 1'b1;
          uop_nxt.wr_s    = 1'b1;
          uop_nxt.wr_p    = pend_p;
          uop_nxt.wr_idx  = pend_idx;
        end
        ev.preload  = 1'b1;
        ev.zero_row = pre_zero;
      end
      S_RUN: begin
        uop_nxt.en_acc1 = 1'b1;
        uop_nxt.zero_m2 = (j == 0);
        uop_nxt.zero_m0 = (j == W - 1);
        ev.border       = (j == 0) || (j == W - 1);
        if (j > 0) begin
          uop_nxt.wr_s   = 1'b1;
          uop_nxt.wr_p   = (int'(ch) == IC - 1);
          uop_nxt.wr_idx = IDXW'(base + j - 1);
        end else if (pend_v) begin
          uop_nxt.wr_s   = 1'b1;
          uop_nxt.wr_p   = pend_p;
          uop_nxt.wr_idx = pend_idx;
        end
        if (j < W - 1) begin
          uop_nxt.en_acc0 = 1'b1;
          uop_nxt.first   = cur_first;
          uop_nxt.rd      = !cur_first;
          uop_nxt.rd_idx  = IDXW'(base + j + 1);
        end else if (r < step_hi(int'(f))) begin
          uop_nxt.en_acc0 = 1'b1;
          uop_nxt.first   = !row_started[o_loc + 1];
          uop_nxt.rd      = row_started[o_loc + 1];
          uop_nxt.rd_idx  = IDXW'(base + W);
        end else if (go_seam) begin
          uop_nxt.load    = 1'b1;
          uop_nxt.en_acc0 = 1'b1;
          uop_nxt.first   = !row_started[cand_lo - cand_f + 1 - o_lo];
          uop_nxt.rd      = row_started[cand_lo - cand_f + 1 - o_lo];
          uop_nxt.rd_idx  = IDXW'((cand_lo - cand_f + 1 - o_lo) * W);
          prune_advance   = 1'b1;
          ev.zero_row     = !prune_keep;
        end
        if (fb_use) begin
          pipe_sel    = tap_sel;
          ev.feedback = 1'b1;
        end else begin
          p_en0   = 1'b1;
          p_addr0 = c.in_base + addr_t'((int'(ch) * IL + r) * IL + j);
        end
      end
      S_FLUSH: begin
        if (pend_v) begin
          uop_nxt.zero_m2 = 1'b1;
          uop_nxt.wr_s    = 1'b1;
          uop_nxt.wr_p    = pend_p;
          uop_nxt.wr_idx  = pend_idx;
        end
      end
      S_LOAD: begin
        if (cand_ex && !cand_exec) begin
          prune_advance = 1'b1;
          ev.skip       = 1'b1;
        end else if (cand_exec && wl_ok && (!cand_last || !drain_busy)) begin
          prune_advance   = 1'b1;
          uop_nxt.load    = 1'b1;
          ev.stall_1x1    = (c.mode == MODE_1X1);
          ev.zero_row     = !prune_keep;
        end else if (cand_exec) begin
          ev.drain_wait = cand_last && drain_busy;
        end
      end
      S_MAC: begin
        uop_nxt.first  = chan_first;
        uop_nxt.rd     = !chan_first;
        uop_nxt.rd_idx = IDXW'(m);
        uop_nxt.wr_s   = 1'b1;
        uop_nxt.wr_p   = (int'(ch) == IC - 1);
        uop_nxt.wr_idx = IDXW'(m);
        if (c.mode == MODE_1X1S) begin
          // small in-fmaps: input feature m of channel ch enters the pipeline
          p_en0   = !zero_ch;
          p_addr0 = c.in_base + addr_t'(int'(ch) * IL * IL + int'(m));
        end else begin
          p_en0   = (int'(g_base) + int'(m) < int'(c.k)) && !zero_ch;
          p_addr0 = c.w_base + addr_t'((int'(g_base) + int'(m)) * IC + int'(ch));
        end
      end
      default: ;
    endcase
  end

  // loader buses Input #1..#3 (and Input #0 for the last CU in 1x1 mode)
  always_comb begin
    int row, col;
    row = 0;
    col = 0;
    for (int b = 0; b < 4; b++) begin
      ld_en[b]   = 1'b0;
      ld_addr[b] = '0;
    end
    if (wl_act) begin
      if (wl_mode == MODE_3X3) begin
        for (int i = 0; i < 3; i++) begin
          ld_en[i+1]   = !wl_zero && (int'(g_base) + int'(wl_k) < int'(c.k));
          ld_addr[i+1] = c.w_base + addr_t'((((int'(g_base) + int'(wl_k)) * IC + int'(wl_ch)) * 3
                                             + int'(wl_f)) * 3 + i);
        end
      end else if (wl_mode == MODE_1X1S) begin
        // weights of filters g_base + 3k + i (and + 3 for the last CU's fourth PE)
        for (int i = 0; i < 4; i++) begin
          if (i < 3 || int'(wl_k) == NUM_CU - 1) begin
            ld_en[(i + 1) % 4]   = !wl_zero && (int'(g_base) + 3 * int'(wl_k) + i < int'(c.k));
            ld_addr[(i + 1) % 4] = c.w_base + addr_t'((int'(g_base) + 3 * int'(wl_k) + i) * IC
                                                      + int'(wl_ch));
          end
        end
      end else begin
        for (int i = 0; i < 4; i++) begin
          row = int'(wl_row);
          col = int'(wl_col) + i;
          if (col >= int'(c.ol)) begin col -= int'(c.ol); row += 1; end
          if (i < 3 || int'(wl_k) == NUM_CU - 1) begin
            ld_en[(i + 1) % 4]   = !wl_zero && (row < int'(c.ol));
            ld_addr[(i + 1) % 4] = c.in_base + addr_t'((int'(wl_ch) * IL + row * int'(c.stride)) * IL
                                                      + col * int'(c.stride));
          end
        end
      end
    end
  end

  always_comb begin
    rd_en[0]   = p_en0 || ld_en[0];
    rd_addr[0] = ld_en[0] ? ld_addr[0] : p_addr0;
    for (int b = 1; b < 4; b++) begin
      rd_en[b]   = ld_en[b];
      rd_addr[b] = ld_addr[b];
    end
  end

  // drain request for the pass that just ended
  always_comb begin
    drain_info           = '0;
    drain_info.mode      = c.mode;
    drain_info.filt_base = g_base;
    drain_info.plane     = 18'(int'(c.ol) * int'(c.ol));
    drain_info.out_base  = c.out_base;
    if (c.mode == MODE_3X3) begin
      drain_info.filt_cnt = CHW'((int'(c.k) - int'(g_base) < NUM_CU) ? int'(c.k) - int'(g_base) : NUM_CU);
      drain_info.pix_base = 18'(o_lo * W);
      drain_info.pix_cnt  = 18'((o_hi - o_lo + 1) * W);
      drain_n_addr = ((o_hi - o_lo + 1) * W < int'(BANK_DEPTH)) ?
                     (BAW+1)'((o_hi - o_lo + 1) * W) : (BAW+1)'(BANK_DEPTH);
    end else if (c.mode == MODE_1X1S) begin
      drain_info.filt_cnt = CHW'((int'(c.k) - int'(g_base) < int'(NPE_TOT)) ?
                                 int'(c.k) - int'(g_base) : NPE_TOT);
      drain_info.pix_base = '0;
      drain_info.pix_cnt  = drain_info.plane;
      drain_n_addr = (BAW+1)'(MAC_N);
    end else begin
      drain_info.filt_cnt = CHW'((int'(c.k) - int'(g_base) < int'(U)) ? int'(c.k) - int'(g_base) : U);
      drain_info.pix_base = pix_base;
      drain_info.pix_cnt  = 18'((int'(drain_info.plane) - int'(pix_base) < int'(NPE_TOT)) ?
                                int'(drain_info.plane) - int'(pix_base) : NPE_TOT);
      drain_n_addr = (BAW+1)'(U);
    end
    fin_group = int'(g_base) + int'(group_size(c.mode)) >= int'(c.k);
    fin_part  = (c.mode == MODE_3X3)  ? (o_hi >= W - 1) :
                (c.mode == MODE_1X1S) ? 1'b1
                                      : (int'(pix_base) + int'(NPE_TOT) >= int'(drain_info.plane));
  end

  assign drain_start = (state == S_END) && (end_cnt == 0) && !drain_busy;
  assign busy        = (state != S_IDLE);
  assign cfg_q       = c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      c <= '0;
      uop <= UOP_NOP;
      done <= 1'b0;
      g_base <= '0; o_lo <= 0; o_hi <= 0; pix_base <= '0; prow0 <= '0; pcol0 <= '0;
      ch <= '0; f <= '0; r <= 0; j <= 0; m <= '0;
      at_start <= 1'b1; cur_first <= 1'b0; step_fb <= 1'b0; pre_zero <= 1'b0;
      chan_first <= 1'b0; zero_ch <= 1'b0; any_done <= 1'b0;
      row_started <= '0; pend_v <= 1'b0; pend_p <= 1'b0; pend_idx <= '0; end_cnt <= 0;
      wl_act <= 1'b0; wl_zero <= 1'b0; wl_mode <= MODE_3X3; wl_k <= '0; wl_ch <= '0;
      wl_f <= '0; wl_row <= '0; wl_col <= '0;
    end else begin
      uop  <= uop_nxt;
      done <= 1'b0;

      // ---- loader ----
      if (wl_act) begin
        if (int'(wl_k) == NUM_CU - 1) wl_act <= 1'b0;
        wl_k <= wl_k + 1'b1;
        if (int'(wl_col) + 3 >= int'(c.ol)) begin
          wl_col <= DIMW'(int'(wl_col) + 3 - int'(c.ol));
          wl_row <= wl_row + 1'b1;
        end else begin
          wl_col <= wl_col + DIMW'(3);
        end
      end
      if (uop_nxt.load) begin
        wl_act  <= 1'b1;
        wl_k    <= '0;
        wl_mode <= c.mode;
        wl_row  <= prow0;
        wl_col  <= pcol0;
        if (state == S_PRE) begin
          wl_ch <= ch; wl_f <= f; wl_zero <= pre_zero;
        end else begin
          wl_ch <= CHW'(cand_ch); wl_f <= 2'(cand_f); wl_zero <= !prune_keep;
        end
      end

      case (state)
        S_IDLE: if (start) begin
          c        <= cfg;
          g_base   <= '0;
          o_lo     <= 0;
          o_hi     <= ((int'(cfg.part_rows) < int'(cfg.ol)) ? int'(cfg.part_rows) : int'(cfg.ol)) - 1;
          pix_base <= '0;
          state    <= S_PASS;
        end
        S_PASS: begin
          at_start    <= 1'b1;
          row_started <= '0;
          pend_v      <= 1'b0;
          any_done    <= 1'b0;
          step_fb     <= 1'b0;
          prow0       <= DIMW'(int'(pix_base) / int'(c.ol));
          pcol0       <= DIMW'(int'(pix_base) % int'(c.ol));
          state       <= (c.mode == MODE_3X3) ? S_SKIP : S_LOAD;
        end
        S_SKIP: begin
          if (!cand_ex) begin
            state <= S_FLUSH;
          end else if (!cand_exec) begin
            ch <= CHW'(cand_ch); f <= 2'(cand_f); at_start <= 1'b0;
          end else if (wl_ok && (!cand_last || !drain_busy)) begin
            ch <= CHW'(cand_ch); f <= 2'(cand_f); at_start <= 1'b0;
            r <= cand_lo; j <= 0;
            pre_zero <= !prune_keep;
            step_fb  <= 1'b0;
            state    <= S_PRE;
          end
        end
        S_PRE: begin
          row_started[o_loc] <= 1'b1;
          cur_first <= !row_started[o_loc];
          pend_v    <= 1'b0;
          state     <= S_RUN;
        end
        S_RUN: begin
          if (j == 0) pend_v <= 1'b0;
          if (j < W - 1) begin
            j <= j + 1;
          end else begin
            pend_v   <= 1'b1;
            pend_p   <= (int'(ch) == IC - 1);
            pend_idx <= IDXW'(base + W - 1);
            j <= 0;
            if (r < step_hi(int'(f))) begin
              r <= r + 1;
              row_started[o_loc + 1] <= 1'b1;
              cur_first <= !row_started[o_loc + 1];
            end else if (go_seam) begin
              ch <= CHW'(cand_ch); f <= 2'(cand_f);
              r  <= cand_lo;
              step_fb <= (cand_ch == int'(ch));
              row_started[cand_lo - cand_f + 1 - o_lo] <= 1'b1;
              cur_first <= !row_started[cand_lo - cand_f + 1 - o_lo];
            end else begin
              state <= cand_ex ? S_SKIP : S_FLUSH;
            end
          end
        end
        S_FLUSH: begin
          pend_v  <= 1'b0;
          end_cnt <= NUM_CU + 2;
          state   <= S_END;
        end
        S_LOAD: begin
          if (!cand_ex) begin
            end_cnt <= NUM_CU + 2;
            state   <= S_END;
          end else if (!cand_exec) begin
            ch <= CHW'(cand_ch); at_start <= 1'b0;
          end else if (wl_ok && (!cand_last || !drain_busy)) begin
            ch <= CHW'(cand_ch); at_start <= 1'b0;
            chan_first <= !any_done;
            any_done   <= 1'b1;
            zero_ch    <= !prune_keep;
            m     <= '0;
            state <= S_MAC;
          end
        end
        S_MAC: begin
          m <= m + 1'b1;
          if (int'(m) == MAC_N - 1) state <= S_LOAD;
        end
        S_END: begin
          if (end_cnt > 0) end_cnt <= end_cnt - 1;
          else if (!drain_busy) begin
            if (fin_part) begin
              o_lo     <= 0;
              o_hi     <= ((int'(c.part_rows) < W) ? int'(c.part_rows) : W) - 1;
              pix_base <= '0;
              g_base   <= g_base + CHW'(group_size(c.mode));
            end else begin
              o_lo     <= o_hi + 1;
              o_hi     <= ((o_hi + int'(c.part_rows) < W - 1) ? o_hi + int'(c.part_rows) : W - 1);
              pix_base <= pix_base + 18'(NPE_TOT);
            end
            state <= (fin_part && fin_group) ? S_FIN : S_PASS;
          end
        end
        S_FIN: begin
          if (!drain_busy) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_small_fits: assert property (@(posedge clk) disable iff (!rst_n)
      (start && state == S_IDLE && cfg.mode == MODE_1X1S) |->
      (int'(cfg.ol) * int'(cfg.ol) <= int'(U) && int'(cfg.ol) * int'(cfg.ol) <= int'(BANK_DEPTH)))
    else $error("carla_controller: in-fmap too large for the small-in-fmap 1x1 mode");

  // the last CU's four-feature load must not collide with a weight on Input #0
  a_bus0_free: assert property (@(posedge clk) disable iff (!rst_n) !(ld_en[0] && p_en0))
    else $error("carla_controller: Input #0 used by loader and pipeline in one cycle");

endmodule
