// sag_pe_gx: processing element with a two-level pipelined data path
// ("Group-X" organisation): the 36-bit data path is cut into three 12-bit
// sections with a pipeline register on the adder's carry between them, so the
// longest carry path is 12 bits instead of 36.
//
// Section j (bits 12j+11 .. 12j) works on a word j clocks after section 0
// does. The data bus is therefore skewed: bits 11..0 of a word come with its
// instruction tag, bits 23..12 one clock later and bits 35..24 two clocks
// later, and dout leaves with the same skew, so PEs cascade directly. The
// control is computed once, in the time frame of section 0, and section j
// receives it through j pipeline registers - the delayed control signals
// that make each section provide and use adder data one clock after the
// section below it.
//
// Every decision that concerns a processor address is taken in section 0,
// because X and DX are 12 bits wide and sit there: C12 is section 0's carry
// out. The only decision that needs a higher section is the sign of the
// intensity for ACC_M; it is known two clocks after the I slot and is needed
// three clocks after it (the following packet's DDI slot, where the deferred
// accumulation takes place), so it is returned to the control in time.
//
// Behaviour, instruction set, packet format and latency of the instruction
// tag (two clocks) are those of sag_pe, the unpipelined element; see there
// for the meaning of each instruction. The pixel leaves on the video chain
// two clocks later than in sag_pe, when the top section of the REF sum is
// known. The section split (three blocks of 12 b), the skew of the data
// input and output and the delayed control follow the original Group-X
// description; the handling of the sign is this design's own.
module sag_pe_gx
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

  localparam int unsigned NS = 3;                // sections
  localparam int unsigned SW = DATA_W / NS;      // 12 bits each
  typedef logic [SW-1:0] sec_t;

  // Control word, produced in section 0's time frame.
  typedef struct packed {
    logic  byp;
    slot_e slot;
    logic  x_dec;       // slot X: send X - 1 on
    logic  emit_reload; // slot DX: the leaving X word is DX - 1
    logic  inr_eval;    // this PE is inside an EVAL range
    logic  eval2;       // DDI is used
    logic  eval12;      // DI is used
    logic  a_v, b_v, c_v;
    logic  st_a, st_b, st_c;   // store a correction from this word
    logic  pend_sel;    // slot DDI: add the pending intensity
    logic  p_clear;     // slot DDI of REF: P is read and cleared
  } ctl_t;

  // ------------------------------------------------- section-0 control
  instr_t rin_i, dly_i;
  logic   a_v, b_v, c_v, dis_f, accneg;
  logic   pk_reload, pk_store, pk_inr;
  ast_e   pk_st;
  logic   pend;                      // accumulation pending (after sign check)
  logic   pend_pre;                  // in range and not disabled, sign unknown
  logic   pend_neg_ok;               // ACC_M state at that I slot
  logic   [1:0] sign_wait;           // I slot two / one clocks ago

  op_e   op;
  slot_e slot;
  logic  addr_op;
  assign op      = rin_i.op;
  assign slot    = rin_i.slot;
  assign addr_op = is_range_op(op) || is_periodic(op) || is_single_set(op);

  logic  c12;              // from section 0's adder
  logic  zero;
  assign zero = !c12;
  logic  i_sign;           // sign of the intensity used, from section 2

  logic x_reload, x_store, x_inr;
  ast_e x_st;
  always_comb begin
    x_reload = 1'b0;
    x_store  = 1'b0;
    x_inr    = 1'b0;
    x_st     = rin_i.st;
    if (is_range_op(op)) begin
      unique case (rin_i.st)
        ST_SEEK:   if (zero) x_reload = 1'b1;
        ST_ACTIVE: if (zero) x_st = ST_DONE; else x_inr = 1'b1;
        default:   ;
      endcase
    end else if (is_periodic(op)) begin
      if (rin_i.st == ST_SEEK && zero) begin
        x_reload = 1'b1;
        x_store  = 1'b1;
      end
    end else if (is_single_set(op)) begin
      if (rin_i.st == ST_SEEK && zero) begin
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
      if (zero)                 dx_st = ST_DONE;
      else if (is_range_op(op)) dx_st = ST_ACTIVE;
      else                      dx_st = ST_SEEK;
      dx_inr = is_range_op(op) && !zero;
    end
  end

  ctl_t ctl;
  always_comb begin
    ctl             = '0;
    ctl.byp         = bypass;
    ctl.slot        = slot;
    ctl.x_dec       = slot == SLOT_X && addr_op && rin_i.st != ST_DONE;
    ctl.emit_reload = slot == SLOT_DX && pk_reload;
    ctl.inr_eval    = pk_inr && is_eval(op);
    ctl.eval2       = op == OP_EVAL2;
    ctl.eval12      = op inside {OP_EVAL1, OP_EVAL2};
    ctl.a_v         = a_v;
    ctl.b_v         = b_v;
    ctl.c_v         = c_v;
    ctl.st_a        = pk_store && slot == SLOT_I   && op inside {OP_SETPI, OP_SETI};
    ctl.st_b        = pk_store && slot == SLOT_DI  && op inside {OP_SETPDI, OP_SETDI};
    ctl.st_c        = pk_store && slot == SLOT_DDI && op inside {OP_SETPDDI, OP_SETDDI};
    ctl.pend_sel    = slot == SLOT_DDI && pend;
    ctl.p_clear     = slot == SLOT_DDI && op == OP_REF;
  end

  // delayed copies of the control for sections 1 and 2
  ctl_t [NS-1:1] ctl_q;
  always_ff @(posedge clk) begin
    if (rst) ctl_q <= '0;
    else     ctl_q <= {ctl_q[NS-2:1], ctl};
  end

  // the pending flag becomes final once section 2 has seen the intensity
  logic pend_next;
  always_comb begin
    pend_next = pend;
    if (!bypass && slot == SLOT_DDI) pend_next = 1'b0;
    if (sign_wait[1]) pend_next = pend_pre && (pend_neg_ok || !i_sign);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rin_i       <= INSTR_NOP;
      dly_i       <= INSTR_NOP;
      a_v         <= 1'b0;
      b_v         <= 1'b0;
      c_v         <= 1'b0;
      dis_f       <= 1'b0;
      accneg      <= 1'b1;
      pk_reload   <= 1'b0;
      pk_store    <= 1'b0;
      pk_inr      <= 1'b0;
      pk_st       <= ST_SEEK;
      pend        <= 1'b0;
      pend_pre    <= 1'b0;
      pend_neg_ok <= 1'b1;
      sign_wait   <= '0;
    end else begin
      rin_i     <= iin;
      dly_i     <= rin_i;
      pend      <= pend_next;
      sign_wait <= {sign_wait[0], 1'b0};
      if (!bypass) begin
        unique case (slot)
          SLOT_X: begin
            pk_reload <= addr_op && x_reload;
            pk_store  <= addr_op && x_store;
            pk_inr    <= addr_op && x_inr;
            pk_st     <= x_st;
            dly_i.st  <= x_st;
            if (op == OP_ACC_M) accneg <= !accneg;
          end
          SLOT_DX: begin
            pk_st  <= dx_st;
            pk_inr <= dx_inr;
            if (addr_op) dly_i.st <= dx_st;
          end
          SLOT_DDI: begin
            if (addr_op) dly_i.st <= pk_st;
            if (op == OP_REF) begin
              a_v    <= 1'b0;
              b_v    <= 1'b0;
              c_v    <= 1'b0;
              dis_f  <= 1'b0;
              accneg <= 1'b1;
            end
            if (ctl.st_c) c_v <= 1'b1;
            if (pk_inr && op == OP_DIS) dis_f <= 1'b1;
          end
          SLOT_DI: begin
            if (addr_op) dly_i.st <= pk_st;
            if (ctl.st_b) b_v <= 1'b1;
          end
          SLOT_I: begin
            if (addr_op) dly_i.st <= pk_st;
            if (ctl.st_a) a_v <= 1'b1;
            if (ctl.inr_eval) begin
              pend_pre    <= !dis_f;
              pend_neg_ok <= accneg;
              sign_wait   <= 2'b01;
              a_v         <= 1'b0;
              b_v         <= 1'b0;
              c_v         <= 1'b0;
              dis_f       <= 1'b0;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------ data sections
  logic [NS-1:0] cout_s;          // carry out of each section, this clock
  logic [NS-1:0] carry_q;         // carry into each section, registered
  sec_t          sum_s [NS];
  sec_t          dout_s [NS];

  always_ff @(posedge clk) begin
    if (rst) carry_q <= '0;
    else     carry_q <= {cout_s[NS-2:0], 1'b0};
  end

  for (genvar j = 0; j < NS; j++) begin : g_sec
    ctl_t c;
    if (j == 0) begin : g_c0
      assign c = ctl;
    end else begin : g_cj
      assign c = ctl_q[j];
    end

    sec_t rin_d, dly_d, p_s, a_s, b_s, c_s, ih_s, tdi_s;
    sec_t ddi_use, di_use, i_use;
    sec_t add_a, add_b;
    logic add_c_tap;

    assign ddi_use = c.eval2  ? (c.c_v ? c_s : rin_d) : '0;
    assign di_use  = c.eval12 ? (c.b_v ? b_s : rin_d) : '0;
    assign i_use   = c.a_v ? a_s : rin_d;

    always_comb begin
      add_a = '0;
      add_b = '0;
      unique case (c.slot)
        SLOT_X, SLOT_DX: begin
          add_a = (j == 0) ? rin_d : '0;
          add_b = (j == 0) ? '1 : '0;
        end
        SLOT_DDI: begin
          add_a = p_s;
          add_b = c.pend_sel ? ih_s : '0;
        end
        SLOT_DI: begin
          add_a = di_use;
          add_b = dly_d;
        end
        SLOT_I: begin
          add_a = i_use;
          add_b = tdi_s;
        end
        default: ;
      endcase
    end

    sag_adder #(.W(SW), .TAP_BIT(SW)) u_add (
      .a    (add_a),
      .b    (add_b),
      .cin  ((j == 0 || c.slot inside {SLOT_X, SLOT_DX}) ? 1'b0 : carry_q[j]),
      .sum  (sum_s[j]),
      .cout (cout_s[j]),
      .c_tap(add_c_tap)
    );

    always_ff @(posedge clk) begin
      if (rst) begin
        rin_d <= '0;
        dly_d <= '0;
        p_s   <= '0;
        a_s   <= '0;
        b_s   <= '0;
        c_s   <= '0;
        ih_s  <= '0;
        tdi_s <= '0;
      end else begin
        rin_d <= din[j*SW +: SW];
        dly_d <= rin_d;
        if (!c.byp) begin
          unique case (c.slot)
            SLOT_X: if (c.x_dec) dly_d <= (j == 0) ? sum_s[j] : '0;
            SLOT_DDI: begin
              if (c.p_clear)       p_s <= '0;
              else if (c.pend_sel) p_s <= sum_s[j];
              if (c.st_c) c_s <= rin_d;
              if (c.inr_eval) dly_d <= ddi_use;
            end
            SLOT_DI: begin
              if (c.st_b) b_s <= rin_d;
              if (c.inr_eval) begin
                tdi_s <= di_use;
                dly_d <= sum_s[j];
              end
            end
            SLOT_I: begin
              if (c.st_a) a_s <= rin_d;
              if (c.inr_eval) begin
                dly_d <= sum_s[j];
                ih_s  <= i_use;
              end
            end
            default: ;
          endcase
        end
      end
    end

    assign dout_s[j] = (!c.byp && c.emit_reload) ? ((j == 0) ? sum_s[j] : '0) : dly_d;
    assign dout[j*SW +: SW] = dout_s[j];
  end

  assign c12    = g_sec[0].add_c_tap;
  assign i_sign = g_sec[NS-1].i_use[SW-1];

  // ---------------------------------------------- instruction output
  always_comb begin
    iout = dly_i;
    if (!bypass && slot == SLOT_DX && addr_op) iout.st = dx_st;
  end

  // --------------------------------------------------------- video
  // The REF sum is complete when section 2 forms it; bit 23 (the lowest
  // integer bit) comes from section 1 one clock earlier.
  logic bit23_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      bit23_q  <= 1'b0;
      vout     <= '0;
      vout_vld <= 1'b0;
    end else begin
      bit23_q  <= sum_s[1][FRAC_W - SW];
      vout     <= vin;
      vout_vld <= vin_vld;
      if (!ctl_q[NS-1].byp && ctl_q[NS-1].p_clear) begin
        vout     <= to_video({sum_s[2], bit23_q, {(DATA_W-SW-1){1'b0}}});
        vout_vld <= 1'b1;
      end
    end
  end

endmodule
