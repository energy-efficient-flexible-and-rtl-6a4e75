// carla_cu: one CARLA convolution unit (CU) with NPE processing elements.
//
// Every PE holds one operand in its register R<i> and multiplies it with the
// value of this CU's pipeline register (pr), which is shared by all PEs of
// the CU. The CU works in one of two modes, chosen per micro-operation:
//
//  3x3 (serial accumulation). R0..R2 hold the three weights of one filter
//  row and pr carries one input feature per cycle. The PEs are chained:
//    ACC0 <= A0 + M0(x*R0)    A0 = 0 or the stored partial sum (S0/S1/S2)
//    ACC1 <= ACC0 + x*R1
//    out  =  ACC1 + M2(x*R2)  written to the S bank chosen by the index
//  so a partial sum moves left to right and one output of a filter row is
//  finished per cycle. M0 zeroes product 0 on the last feature of a row and
//  M2 zeroes product 2 on the first one; those zeros stand in for the zero
//  padding at the left and right borders, so padded columns cost no cycles.
//  PE #2 can write every S/P bank pair of the CU (MUX B0/B1), so one CU
//  holds NPE*BANK_DEPTH outputs; output index o lives in bank o/BANK_DEPTH.
//
//  1x1 (independent PEs). R<i> hold NPE input features and pr carries one
//  weight per cycle; PE i computes out_i = A_i + x_i*w and writes bank i at
//  the address given by the micro-operation (the filter number). The 1x1
//  mode for small in-fmaps uses the same datapath with the roles of R and
//  pr swapped: R<i> hold the weights of NPE filters, pr carries the features
//  and the address is the pixel number.
//
// When a micro-operation sets wr_p, the result is also rounded to 16 bits
// (arithmetic shift by FRAC, saturation) and written into the P bank, from
// where the output drain reads it through the p_rd_* port.
//
// Timing: ctrl and pr belong to the same cycle. ctrl_nxt is the control word
// of the next cycle and addresses the S read, so a stored partial sum arrives
// exactly when it is used. R registers load from the broadcast buses bus[1..3]
// (and bus[0] for a fourth PE) at the clock edge that ends a cycle with
// ctrl.load set. The 3x3/1x1 dataflows, the register, multiplexer and bank
// structure follow the design description; the bank depth split, the output
// rounding and the control word encoding are this implementation's choices.
module carla_cu
  import carla_pkg::*;
#(
  parameter int unsigned NPE        = 3,   // 3, or 4 for the last CU
  parameter int unsigned BANK_DEPTH = 75,  // words per S and per P bank
  parameter int unsigned FRAC       = 8,   // output = sat(sum >>> FRAC)
  localparam int unsigned BAW = (BANK_DEPTH > 1) ? $clog2(BANK_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  uop_t              ctrl,
  input  uop_t              ctrl_nxt,
  input  word_t             pr,
  input  word_t             bus [4],
  input  logic              p_rd_en,
  input  logic [BAW-1:0]    p_rd_addr,
  output word_t             p_rd_data [NPE]
);

  word_t r       [NPE];
  acc_t  prod    [NPE];
  acc_t  s_rdata [NPE];
  acc_t  acc0, acc1;

  // ---------------- operand registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPE; i++) r[i] <= '0;
    end else if (ctrl.load) begin
      for (int i = 0; i < NPE; i++)
        r[i] <= (i < 3) ? bus[i+1] : bus[0];
    end
  end

  always_comb begin
    for (int i = 0; i < NPE; i++) prod[i] = acc_t'(r[i]) * acc_t'(pr);
  end

  // ---------------- bank selection (3x3) ----------------
  function automatic int unsigned bank_of(logic [IDXW-1:0] idx);
    int unsigned b;
    b = 0;
    for (int i = 1; i < NPE; i++)
      if (int'(idx) >= i * int'(BANK_DEPTH)) b = i;
    return b;
  endfunction

  int unsigned rd_bank_nxt, rd_bank, wr_bank;
  assign rd_bank_nxt = bank_of(ctrl_nxt.rd_idx);
  assign rd_bank     = bank_of(ctrl.rd_idx);
  assign wr_bank     = bank_of(ctrl.wr_idx);

  // ---------------- A muxes and adders ----------------
  acc_t a0, out2;
  acc_t out_i [NPE];

  always_comb begin
    // MUX A0: 0 or a stored partial sum (any S bank in 3x3, S0 in 1x1)
    if (ctrl.first)                 a0 = '0;
    else if (ctrl.mode == MODE_3X3) a0 = s_rdata[rd_bank];
    else                            a0 = s_rdata[0];
    // PE #2 in 3x3: ACC1 + M2(product 2)
    out2 = acc1 + (ctrl.zero_m2 ? acc_t'(0) : prod[2]);
    // 1x1: every PE adds its own stored partial sum (MUX A1, A2 select S1, S2)
    for (int i = 0; i < NPE; i++)
      out_i[i] = (ctrl.first ? acc_t'(0) : s_rdata[i]) + prod[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc0 <= '0;
      acc1 <= '0;
    end else if (ctrl.mode == MODE_3X3) begin
      if (ctrl.en_acc0) acc0 <= a0 + (ctrl.zero_m0 ? acc_t'(0) : prod[0]);
      if (ctrl.en_acc1) acc1 <= acc0 + prod[1];   // MUX A1 selects ACC0
    end
  end

  // ---------------- S and P banks with MUX B ----------------
  for (genvar i = 0; i < NPE; i++) begin : g_bank
    logic           s_we, s_re;
    logic [BAW-1:0] s_waddr, s_raddr;
    acc_t           wdata;
    logic [DW-1:0]  p_rdata;

    always_comb begin
      if (ctrl.mode == MODE_3X3) begin
        // MUX B: in 3x3 mode the banks are written by PE #2 only
        s_we    = ctrl.wr_s && (wr_bank == i) && (i < 3);
        s_waddr = BAW'(int'(ctrl.wr_idx) - int'(wr_bank * BANK_DEPTH));
        wdata   = out2;
      end else begin
        s_we    = ctrl.wr_s;
        s_waddr = BAW'(ctrl.wr_idx);
        wdata   = out_i[i];
      end
      if (ctrl_nxt.mode == MODE_3X3) begin
        s_re    = ctrl_nxt.rd && (rd_bank_nxt == i);
        s_raddr = BAW'(int'(ctrl_nxt.rd_idx) - int'(rd_bank_nxt * BANK_DEPTH));
      end else begin
        s_re    = ctrl_nxt.rd;
        s_raddr = BAW'(ctrl_nxt.rd_idx);
      end
    end

    carla_sram #(.WIDTH(ACCW), .DEPTH(BANK_DEPTH)) u_s (
      .clk, .we(s_we), .waddr(s_waddr), .wdata(wdata),
      .re(s_re), .raddr(s_raddr), .rdata(s_rdata[i]));

    carla_sram #(.WIDTH(DW), .DEPTH(BANK_DEPTH)) u_p (
      .clk, .we(s_we && ctrl.wr_p), .waddr(s_waddr), .wdata(to_word(wdata, FRAC)),
      .re(p_rd_en), .raddr(p_rd_addr), .rdata(p_rdata));

    assign p_rd_data[i] = word_t'(p_rdata);
  end

endmodule
