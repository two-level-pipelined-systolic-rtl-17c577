// sag_pe_gy: processing element with a deeply pipelined data path
// ("Group-Y" organisation), the variant used for the silicon prototype.
// Pipeline registers on the adder's carry cut the 36-bit data path into nine
// sections of 3, 5, 4, 3, 5, 4, 3, 5 and 4 bits (LSB first), so the longest
// carry path is 5 bits.
//
// Section j works on a word j clocks after section 0 does, so the data bus
// is skewed by section: bits of section j arrive, and leave, j clocks after
// the word's instruction tag. The control for a word is computed once, in
// section 0's time frame, and reaches section j through j pipeline
// registers.
//
// Address decisions. The 12-bit address spans sections 0..2, so whether
// X = 0 (C12, the carry out of section 2) is known two clocks after the tag.
// The address decisions are therefore taken in section 2's time frame, and
// every output multiplexer that depends on them sits two pipeline stages
// further down the word buses than in sag_pe: each word, tag and data
// section alike, leaves the PE four clocks after it entered (two more than
// sag_pe). Until the decision is known the PE computes the interpolation
// values speculatively and carries both the raw and the computed word
// along; the output multiplexer then picks one.
//
// Negative intensities. Whether a negative intensity is added to the pixel
// (ACC_M) needs the sign, which the top section sees eight clocks after the
// I slot - after the deferred accumulation (the DDI slot of the following
// packet, three clocks after the I slot) has already started in the low
// sections. The PE therefore always accumulates, keeps the previous pixel
// value of each section in a backup register, and restores it when the
// sign turns out to exclude the intensity. The restore reaches section j
// eight + j clocks after the I slot, exactly when section j next reads its
// pixel register; a REF read-out in between is corrected the same way
// before its pixel is sent.
//
// Video: the REF sum is complete when the top section has formed it, eight
// clocks after section 0. Since REF now advances four clocks per PE, the
// video chain has three registers per PE so that the pixels of a row still
// leave on consecutive clocks.
//
// Host rules: as for sag_pe, and in addition packets must follow one
// another without gaps (idle time filled with NOP packets, never single NOP
// words), because the restore above is timed from the packet that follows.
//
// The section widths, the skewed input, the delayed control, the two-clock
// postponement of address decisions and the two extra clocks of latency
// follow the original Group-Y description. The speculative accumulation with
// restore, the three-register video chain and the output timing of the
// pixels are this design's own. Behaviour and instruction set are those of
// sag_pe.
module sag_pe_gy
  import sag_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   bypass,
  input  data_t  din,      // skewed: section j delayed by j clocks
  input  instr_t iin,
  input  video_t vin,
  input  logic   vin_vld,
  output data_t  dout,     // skewed like din
  output instr_t iout,
  output video_t vout,
  output logic   vout_vld
);

  localparam int unsigned NS = 9;
  localparam int unsigned SEC_W  [NS] = '{3, 5, 4, 3, 5, 4, 3, 5, 4};
  localparam int unsigned SEC_LO [NS] = '{0, 3, 8, 12, 15, 20, 24, 27, 32};
  localparam int unsigned AS = 2;   // last section of the 12-bit address
  localparam int unsigned VS = 5;   // section holding bit FRAC_W (23)

  typedef struct packed {
    logic  byp;
    slot_e slot;
    // adder side: the word entering this section now
    logic  x_dec;       // slot X: send X - 1 on
    logic  eval2;       // DDI is used
    logic  eval12;      // DI is used
    logic  a_v, b_v, c_v;
    logic  inr_eval;    // slot I: keep the intensity for accumulation
    logic  acc;         // slot I: it will be accumulated (sign not checked)
    logic  neg_ok;      // slot I: negative values are accumulated
    logic  pend_sel;    // slot DDI: add the pending intensity
    logic  p_clear;     // slot DDI of REF: P is read and cleared
    logic  st_a, st_b, st_c;   // store the word in the delay register
    // output side: the word leaving this section now
    logic  emit_reload; // leaving X word is DX - 1
    logic  sel_comp;    // leaving word is the interpolated value
  } ctl_t;

  // ------------------------------------------- tag pipeline and state
  instr_t rin_i, d1_i, d2_i, d3_i;
  logic   a_v, b_v, c_v, dis_f, accneg, pend, st_a_pend;
  logic   pk_reload, pk_store, pk_inr;
  ast_e   pk_st;

  op_e   op;
  slot_e slot;
  logic  addr_op;
  assign op      = rin_i.op;
  assign slot    = rin_i.slot;
  assign addr_op = is_range_op(op) || is_periodic(op) || is_single_set(op);

  ctl_t          ctl;
  ctl_t [NS-1:1] ctl_q;
  ctl_t          ctl_s [NS];

  // address decisions, section 2's time frame (tag d2_i)
  logic  c12, zero;
  assign zero = !c12;
  op_e   op2;
  logic  addr_op2, byp2;
  assign op2      = d2_i.op;
  assign addr_op2 = is_range_op(op2) || is_periodic(op2) || is_single_set(op2);
  assign byp2     = ctl_s[AS].byp;

  logic x_reload, x_store, x_inr;
  ast_e x_st;
  always_comb begin
    x_reload = 1'b0;
    x_store  = 1'b0;
    x_inr    = 1'b0;
    x_st     = d2_i.st;
    if (is_range_op(op2)) begin
      unique case (d2_i.st)
        ST_SEEK:   if (zero) x_reload = 1'b1;
        ST_ACTIVE: if (zero) x_st = ST_DONE; else x_inr = 1'b1;
        default:   ;
      endcase
    end else if (is_periodic(op2)) begin
      if (d2_i.st == ST_SEEK && zero) begin
        x_reload = 1'b1;
        x_store  = 1'b1;
      end
    end else if (is_single_set(op2)) begin
      if (d2_i.st == ST_SEEK && zero) begin
        x_store = 1'b1;
        x_st    = ST_DONE;
      end
    end
  end

  ast_e dx_st;
  logic dx_inr;
  always_comb begin
    dx_st  = pk_st;
    dx_inr = pk_inr;
    if (pk_reload) begin
      if (zero)                  dx_st = ST_DONE;
      else if (is_range_op(op2)) dx_st = ST_ACTIVE;
      else                       dx_st = ST_SEEK;
      dx_inr = is_range_op(op2) && !zero;
    end
  end

  // control, section 0's time frame
  op_e  op3;
  assign op3 = d3_i.op;
  always_comb begin
    ctl             = '0;
    ctl.byp         = bypass;
    ctl.slot        = slot;
    ctl.x_dec       = !bypass && slot == SLOT_X && addr_op && rin_i.st != ST_DONE;
    ctl.eval2       = op == OP_EVAL2;
    ctl.eval12      = op inside {OP_EVAL1, OP_EVAL2};
    ctl.a_v         = a_v;
    ctl.b_v         = b_v;
    ctl.c_v         = c_v;
    ctl.inr_eval    = !bypass && slot == SLOT_I && pk_inr && is_eval(op);
    ctl.acc         = ctl.inr_eval && !dis_f;
    ctl.neg_ok      = accneg;
    ctl.pend_sel    = !bypass && slot == SLOT_DDI && pend;
    ctl.p_clear     = !bypass && slot == SLOT_DDI && op == OP_REF;
    ctl.st_c        = !bypass && slot == SLOT_DI && pk_store && op inside {OP_SETPDDI, OP_SETDDI};
    ctl.st_b        = !bypass && slot == SLOT_I  && pk_store && op inside {OP_SETPDI, OP_SETDI};
    ctl.st_a        = !bypass && st_a_pend;
    ctl.emit_reload = !bypass && d3_i.slot == SLOT_X && pk_reload &&
                      (is_range_op(op3) || is_periodic(op3) || is_single_set(op3));
    ctl.sel_comp    = !bypass && d3_i.slot inside {SLOT_DDI, SLOT_DI, SLOT_I} &&
                      pk_inr && is_eval(op3);
  end

  always_ff @(posedge clk) begin
    if (rst) ctl_q <= '0;
    else     ctl_q <= {ctl_q[NS-2:1], ctl};
  end

  always_comb begin
    ctl_s[0] = ctl;
    for (int j = 1; j < NS; j++) ctl_s[j] = ctl_q[j];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rin_i     <= INSTR_NOP;
      d1_i      <= INSTR_NOP;
      d2_i      <= INSTR_NOP;
      d3_i      <= INSTR_NOP;
      a_v       <= 1'b0;
      b_v       <= 1'b0;
      c_v       <= 1'b0;
      dis_f     <= 1'b0;
      accneg    <= 1'b1;
      pend      <= 1'b0;
      st_a_pend <= 1'b0;
      pk_reload <= 1'b0;
      pk_store  <= 1'b0;
      pk_inr    <= 1'b0;
      pk_st     <= ST_SEEK;
    end else begin
      rin_i     <= iin;
      d1_i      <= rin_i;
      d2_i      <= d1_i;
      d3_i      <= d2_i;
      st_a_pend <= !bypass && slot == SLOT_I && pk_store && op inside {OP_SETPI, OP_SETI};
      if (ctl.st_a) a_v <= 1'b1;
      if (!byp2 && addr_op2) begin
        if (d2_i.slot == SLOT_X) begin
          pk_reload <= x_reload;
          pk_store  <= x_store;
          pk_inr    <= x_inr;
          pk_st     <= x_st;
        end else if (d2_i.slot == SLOT_DX) begin
          pk_st  <= dx_st;
          pk_inr <= dx_inr;
        end
      end else if (!byp2 && d2_i.slot == SLOT_X) begin
        pk_reload <= 1'b0;
        pk_store  <= 1'b0;
        pk_inr    <= 1'b0;
      end
      if (!bypass) begin
        unique case (slot)
          SLOT_X: if (op == OP_ACC_M) accneg <= !accneg;
          SLOT_DDI: begin
            pend <= 1'b0;
            if (op == OP_REF) begin
              a_v    <= 1'b0;
              b_v    <= 1'b0;
              c_v    <= 1'b0;
              dis_f  <= 1'b0;
              accneg <= 1'b1;
            end
          end
          SLOT_DI: if (ctl.st_c) c_v <= 1'b1;
          SLOT_I: begin
            if (ctl.st_b) b_v <= 1'b1;
            if (pk_inr && op == OP_DIS) dis_f <= 1'b1;
            if (ctl.inr_eval) begin
              pend  <= ctl.acc;
              a_v   <= 1'b0;
              b_v   <= 1'b0;
              c_v   <= 1'b0;
              dis_f <= 1'b0;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------ restore after sign
  // undo_s[j]: section j must take its pixel value back from the backup
  logic          undo0;
  logic [NS-1:1] undo_q;
  logic [NS-1:0] undo_s;
  always_ff @(posedge clk) begin
    if (rst) undo_q <= '0;
    else     undo_q <= {undo_q[NS-2:1], undo0};
  end
  assign undo_s = {undo_q, undo0};

  // ------------------------------------------------------ data sections
  logic [NS-1:0] cout_s;
  logic [NS-1:0] carry_q;
  logic          top_sign;

  always_ff @(posedge clk) begin
    if (rst) carry_q <= '0;
    else     carry_q <= {cout_s[NS-2:0], 1'b0};
  end

  for (genvar j = 0; j < NS; j++) begin : g_sec
    localparam int unsigned W  = SEC_W[j];
    localparam int unsigned LO = SEC_LO[j];
    typedef logic [W-1:0] sec_t;

    ctl_t c;
    assign c = ctl_s[j];

    sec_t rin_d, dly_d, r2, r3, k1, k2, k3, dxh;
    sec_t p_s, bk_s, a_s, b_s, c_s, ih_s, tdi_s, tddi_s, rs_sum, rs_p;
    sec_t ddi_use, di_use, i_use, p_cur, sum, add_a, add_b;
    logic addr_slot, cin, add_c_tap;

    assign addr_slot = c.slot inside {SLOT_X, SLOT_DX};
    assign ddi_use   = c.eval2  ? (c.c_v ? c_s : rin_d) : '0;
    assign di_use    = c.eval12 ? (c.b_v ? b_s : rin_d) : '0;
    assign i_use     = c.a_v ? a_s : rin_d;
    assign p_cur     = undo_s[j] ? bk_s : p_s;

    always_comb begin
      add_a = '0;
      add_b = '0;
      unique case (c.slot)
        SLOT_X, SLOT_DX: begin
          add_a = (j <= AS) ? rin_d : '0;
          add_b = (j <= AS) ? '1 : '0;
        end
        SLOT_DDI: begin
          add_a = p_cur;
          add_b = c.pend_sel ? ih_s : '0;
        end
        SLOT_DI: begin
          add_a = di_use;
          add_b = tddi_s;
        end
        SLOT_I: begin
          add_a = i_use;
          add_b = tdi_s;
        end
        default: ;
      endcase
    end

    assign cin = (j == 0 || (addr_slot && j > AS)) ? 1'b0 : carry_q[j];

    sag_adder #(.W(W), .TAP_BIT(W)) u_add (
      .a    (add_a),
      .b    (add_b),
      .cin  (cin),
      .sum  (sum),
      .cout (cout_s[j]),
      .c_tap(add_c_tap)
    );

    always_ff @(posedge clk) begin
      if (rst) begin
        rin_d  <= '0;
        dly_d  <= '0;
        r2     <= '0;
        r3     <= '0;
        k1     <= '0;
        k2     <= '0;
        k3     <= '0;
        dxh    <= '0;
        p_s    <= '0;
        bk_s   <= '0;
        a_s    <= '0;
        b_s    <= '0;
        c_s    <= '0;
        ih_s   <= '0;
        tdi_s  <= '0;
        tddi_s <= '0;
        rs_sum <= '0;
        rs_p   <= '0;
      end else begin
        rin_d <= din[LO +: W];
        dly_d <= c.x_dec ? ((j <= AS) ? sum : '0) : rin_d;
        r2    <= dly_d;
        r3    <= r2;
        k1    <= (c.slot == SLOT_DDI) ? ddi_use : sum;
        k2    <= k1;
        k3    <= k2;
        p_s   <= p_cur;
        if (!c.byp) begin
          if (c.st_a) a_s <= dly_d;
          if (c.st_b) b_s <= dly_d;
          if (c.st_c) c_s <= dly_d;
          unique case (c.slot)
            SLOT_DX: dxh <= (j <= AS) ? sum : '0;
            SLOT_DDI: begin
              tddi_s <= ddi_use;
              if (c.p_clear) begin
                p_s    <= '0;
                bk_s   <= '0;
                rs_sum <= sum;
                rs_p   <= p_cur;
              end else if (c.pend_sel) begin
                p_s  <= sum;
                bk_s <= p_cur;
              end
            end
            SLOT_DI: tdi_s <= di_use;
            SLOT_I:  if (c.inr_eval) ih_s <= i_use;
            default: ;
          endcase
        end
      end
    end

    // rightmost multiplexer, two stages after the address decision
    assign dout[LO +: W] = c.emit_reload ? dxh : (c.sel_comp ? k3 : r3);
  end

  assign c12      = cout_s[AS];
  assign top_sign = g_sec[NS-1].i_use[SEC_W[NS-1]-1];
  assign undo0    = ctl_s[NS-1].acc && !ctl_s[NS-1].neg_ok && top_sign;

  // ---------------------------------------------- instruction output
  always_comb begin
    iout = d3_i;
    if (!bypass && (is_range_op(op3) || is_periodic(op3) || is_single_set(op3)))
      iout.st = (d3_i.slot == SLOT_X) ? dx_st : pk_st;
  end

  // --------------------------------------------------------- video
  // The REF read-out of the sections that carry bits 35..20 is complete
  // when the top section forms its part; a restore decided in the meantime
  // selects the pixel value without the last intensity.
  data_t  v_sum, v_p;
  video_t v1, v2;
  logic   v1_vld, v2_vld;
  assign v_sum = {g_sec[8].sum, g_sec[7].rs_sum, g_sec[6].rs_sum, g_sec[VS].rs_sum,
                  {SEC_LO[VS]{1'b0}}};
  assign v_p   = {g_sec[8].p_cur, g_sec[7].rs_p, g_sec[6].rs_p, g_sec[VS].rs_p,
                  {SEC_LO[VS]{1'b0}}};

  always_ff @(posedge clk) begin
    if (rst) begin
      v1       <= '0;
      v2       <= '0;
      vout     <= '0;
      v1_vld   <= 1'b0;
      v2_vld   <= 1'b0;
      vout_vld <= 1'b0;
    end else begin
      v1       <= vin;
      v1_vld   <= vin_vld;
      v2       <= v1;
      v2_vld   <= v1_vld;
      vout     <= v2;
      vout_vld <= v2_vld;
      if (!ctl_s[NS-1].byp && ctl_s[NS-1].p_clear) begin
        vout     <= to_video(undo_q[3] ? v_p : v_sum);
        vout_vld <= 1'b1;
      end
    end
  end

endmodule
