// sag_pe: one processing element of the systolic array graphics engine.
//
// A PE owns one pixel column of the current display row. Instructions arrive
// as packets of five consecutive words on the data bus (X, DX, DDI, DI, I),
// each word tagged on the instruction bus with its opcode, its slot number
// and the packet's address state. The PE decrements the address word as the
// packet passes; when it finds X = 0 (the adder's carry C12 out of bit 11 is
// 0 when X - 1 is formed) the PE is location X + 1. There the address word
// is replaced by DX - 1 so that later PEs find X + DX + 1 (end of an EVAL*
// or DIS range) or the next period of a SETP* in the same way.
//
// Inside an EVAL range the PE takes I, DI and DDI, replaces each by its
// stored correction if a SET* left one here, adds the intensity to its pixel
// register P and sends I + DI and DI + DDI on to the next PE (forward
// differences). One adder does all of this because the operands arrive in
// different slots:
//   slot X   : X - 1              (location test, C12)
//   slot DX  : DX - 1             (new address after a hit; C12 also flags DX = 0)
//   slot DDI : P + pending I      (accumulation of the previous packet, or the
//                                  final pixel value when the packet is REF)
//   slot DI  : DI + DDI
//   slot I   : I + DI
// Accumulation is deferred to the DDI slot of the following packet, the only
// slot in which the adder is always free; REF reads P through that same sum.
//
// Registers A, B, C hold the corrections for I, DI and DDI (SET*/SETP*), each
// with a valid bit; a correction replaces the interpolated value at this
// pixel during the next EVAL that covers the PE and is then used up, as is a
// DIS mark. ACC_M toggles whether negative intensities are accumulated
// (after REF they are). REF puts the pixel on the video chain and resets P,
// A, B, C, the DIS mark and the ACC_M mode.
//
// Timing: every bus word leaves the PE two clocks after it entered (input
// buffer BUF, then a one-word delay that lets the address word wait for DX).
// The video chain has one register per PE. With bypass = 1 (a faulty PE)
// words and video pass through with the same latency, unchanged, and the PE
// does not count as a location. Reset is synchronous.
//
// The instruction set, slot order, word widths, C12 location test, X -> DX
// substitution and bypass follow the original engine; the bus tag format, the
// deferred accumulation, the half-open EVAL range and the replace semantics
// of SET* are this design's own choices.
module sag_pe
  import sag_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   bypass,
  input  data_t  din,
  input  instr_t iin,
  input  video_t vin,
  input  logic   vin_vld,
  output data_t  dout,
  output instr_t iout,
  output video_t vout,
  output logic   vout_vld
);

  // ---------------------------------------------------------------- BUF
  data_t  rin_d;
  instr_t rin_i;
  // one-word delay behind the processing stage
  data_t  dly_d;
  instr_t dly_i;

  // ---------------------------------------------------------- PE state
  data_t p_acc;                 // P: pixel storage
  data_t a_reg, b_reg, c_reg;   // corrections for I, DI, DDI
  logic  a_v, b_v, c_v;
  logic  dis_f;                 // accumulation disabled for the next EVAL
  logic  accneg;                // negative intensities are accumulated
  logic  pend;                  // an intensity waits to be accumulated
  data_t i_hold;                // that intensity
  data_t t_di;                  // DI used at this pixel, for I + DI

  // per-packet decisions
  logic  pk_reload;             // this PE is a hit that reloads DX - 1
  logic  pk_store;              // this PE is a hit of a SET*/SETP*
  logic  pk_inr;                // this PE lies in the EVAL*/DIS range
  ast_e  pk_st;                 // state carried on by this packet

  // ------------------------------------------------------------ decode
  op_e   op;
  slot_e slot;
  logic  addr_op;
  assign op      = rin_i.op;
  assign slot    = rin_i.slot;
  assign addr_op = is_range_op(op) || is_periodic(op) || is_single_set(op);

  // ------------------------------------------------------------- adder
  data_t add_a, add_b, add_s;
  logic  add_cout, c12;

  data_t ddi_use, di_use, i_use;
  assign ddi_use = (op == OP_EVAL2) ? (c_v ? c_reg : rin_d) : '0;
  assign di_use  = (op inside {OP_EVAL1, OP_EVAL2}) ? (b_v ? b_reg : rin_d) : '0;
  assign i_use   = a_v ? a_reg : rin_d;

  // operand multiplexer in front of the adder
  always_comb begin
    add_a = '0;
    add_b = '0;
    unique case (slot)
      SLOT_X, SLOT_DX: begin
        add_a = data_t'(rin_d[ADDR_W-1:0]);
        add_b = '1;                            // minus one
      end
      SLOT_DDI: begin
        add_a = p_acc;
        add_b = pend ? i_hold : '0;
      end
      SLOT_DI: begin
        add_a = di_use;
        add_b = dly_d;                         // DDI used at this pixel
      end
      SLOT_I: begin
        add_a = i_use;
        add_b = t_di;
      end
      default: ;
    endcase
  end

  sag_adder #(.W(DATA_W), .TAP_BIT(ADDR_W)) u_add (
    .a    (add_a),
    .b    (add_b),
    .cin  (1'b0),
    .sum  (add_s),
    .cout (add_cout),
    .c_tap(c12)
  );

  // ------------------------------------------------- address decisions
  logic zero;        // the word in the adder (X or DX) is zero
  assign zero = !c12;

  // slot X: what this PE is for the packet
  logic x_reload, x_store, x_inr;
  ast_e x_st;
  always_comb begin
    x_reload = 1'b0;
    x_store  = 1'b0;
    x_inr    = 1'b0;
    x_st     = rin_i.st;
    if (is_range_op(op)) begin
      unique case (rin_i.st)
        ST_SEEK:   if (zero) x_reload = 1'b1;               // start of range
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

  // slot DX: after a hit, DX = 0 ends the instruction here
  ast_e dx_st;
  logic dx_inr;
  always_comb begin
    dx_st  = pk_st;
    dx_inr = pk_inr;
    if (pk_reload) begin
      if (zero)                dx_st = ST_DONE;
      else if (is_range_op(op)) dx_st = ST_ACTIVE;
      else                     dx_st = ST_SEEK;
      dx_inr = is_range_op(op) && !zero;
    end
  end

  // ------------------------------------------- output multiplexers
  logic emit_reload;
  assign emit_reload = !bypass && slot == SLOT_DX && pk_reload;

  always_comb begin
    dout = dly_d;
    iout = dly_i;
    if (!bypass && slot == SLOT_DX && addr_op) begin
      iout.st = dx_st;                         // word X leaves now
      if (emit_reload) dout = data_t'(add_s[ADDR_W-1:0]);
    end
  end

  // ------------------------------------------------------ sequencing
  logic is_ref_read;
  assign is_ref_read = !bypass && op == OP_REF && slot == SLOT_DDI;

  always_ff @(posedge clk) begin
    if (rst) begin
      rin_d     <= '0;
      rin_i     <= INSTR_NOP;
      dly_d     <= '0;
      dly_i     <= INSTR_NOP;
      p_acc     <= '0;
      a_reg     <= '0;
      b_reg     <= '0;
      c_reg     <= '0;
      a_v       <= 1'b0;
      b_v       <= 1'b0;
      c_v       <= 1'b0;
      dis_f     <= 1'b0;
      accneg    <= 1'b1;
      pend      <= 1'b0;
      i_hold    <= '0;
      t_di      <= '0;
      pk_reload <= 1'b0;
      pk_store  <= 1'b0;
      pk_inr    <= 1'b0;
      pk_st     <= ST_SEEK;
      vout      <= '0;
      vout_vld  <= 1'b0;
    end else begin
      rin_d <= din;
      rin_i <= iin;

      // video chain
      vout     <= vin;
      vout_vld <= vin_vld;

      // default: the word moves on unchanged
      dly_d <= rin_d;
      dly_i <= rin_i;

      if (!bypass) begin
        unique case (slot)
          SLOT_X: begin
            pk_reload <= addr_op && x_reload;
            pk_store  <= addr_op && x_store;
            pk_inr    <= addr_op && x_inr;
            pk_st     <= x_st;
            if (addr_op && rin_i.st != ST_DONE)
              dly_d <= data_t'(add_s[ADDR_W-1:0]);   // X - 1
            dly_i.st <= x_st;
            if (op == OP_ACC_M) accneg <= !accneg;
          end

          SLOT_DX: begin
            pk_st    <= dx_st;
            pk_inr   <= dx_inr;
            if (addr_op) dly_i.st <= dx_st;
          end

          SLOT_DDI: begin
            if (addr_op) dly_i.st <= pk_st;
            if (is_ref_read) begin
              vout     <= to_video(add_s);
              vout_vld <= 1'b1;
              p_acc    <= '0;
              a_v      <= 1'b0;
              b_v      <= 1'b0;
              c_v      <= 1'b0;
              dis_f    <= 1'b0;
              accneg   <= 1'b1;
            end else if (pend) begin
              p_acc <= add_s;
            end
            pend <= 1'b0;
            if (pk_store && op inside {OP_SETPDDI, OP_SETDDI}) begin
              c_reg <= rin_d;
              c_v   <= 1'b1;
            end
            if (pk_inr && op == OP_DIS) dis_f <= 1'b1;
            if (pk_inr && is_eval(op)) dly_d <= ddi_use;
          end

          SLOT_DI: begin
            if (addr_op) dly_i.st <= pk_st;
            if (pk_store && op inside {OP_SETPDI, OP_SETDI}) begin
              b_reg <= rin_d;
              b_v   <= 1'b1;
            end
            if (pk_inr && is_eval(op)) begin
              t_di  <= di_use;
              dly_d <= add_s;                        // DI + DDI
            end
          end

          SLOT_I: begin
            if (addr_op) dly_i.st <= pk_st;
            if (pk_store && op inside {OP_SETPI, OP_SETI}) begin
              a_reg <= rin_d;
              a_v   <= 1'b1;
            end
            if (pk_inr && is_eval(op)) begin
              dly_d  <= add_s;                       // I + DI
              i_hold <= i_use;
              pend   <= !dis_f && (accneg || !i_use[DATA_W-1]);
              a_v    <= 1'b0;
              b_v    <= 1'b0;
              c_v    <= 1'b0;
              dis_f  <= 1'b0;
            end
          end

          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------ bus rules
  // The words of a packet are contiguous: a word in slot s > 0 follows the
  // word of slot s - 1 of the same instruction.
  instr_t prev_i;
  logic   prev_ok;
  always_ff @(posedge clk) begin
    if (rst) begin
      prev_i  <= INSTR_NOP;
      prev_ok <= 1'b0;
    end else begin
      prev_i  <= rin_i;
      prev_ok <= 1'b1;
    end
  end

  a_packet_contiguous: assert property (@(posedge clk) disable iff (rst)
    (prev_ok && rin_i.op != OP_NOP && rin_i.slot != SLOT_X)
      |-> (prev_i.op == rin_i.op && prev_i.slot == slot_e'(rin_i.slot - 3'd1)));

endmodule
