// tb_sag_engine_gx: end-to-end test of the graphics engine built from the
// two-level pipelined PEs (GROUP_Y = 0, GROUP_X = 1), nine PEs. The data
// words are sent and received with the 12-bit section skew of those PEs.
//
// The bench sends rows of instructions, each row closed by REF, and compares
// every pixel read out on the video chain with a reference model written
// from the instruction-set semantics alone: it walks each instruction over
// the pixel columns (no slots, no address counters, no deferred
// accumulation). It also checks
//   * the clock at which every pixel leaves vout (N_PE + k + 2 clocks after
//     the edge that loads REF's DDI word, k = physical PE index),
//   * the words that leave the last PE for packets that are still looking
//     for their start (X - columns) or whose EVAL range runs past the last
//     column (address, DDI, DI and I continue for a cascaded engine).
// Rows are partly directed, to make every mechanism happen, and partly
// random. A faulty-PE bypass mask is applied in the second half. The bench
// counts how often each mechanism occurred and fails if one never did.
module tb_sag_engine_gx;
  import sag_pkg::*;

  localparam int unsigned N = 9;          // must match the engine default
  localparam bit          SKEW = 1'b1;    // data bus skewed by 12-bit section
  localparam int unsigned VID_EXTRA = SKEW ? 2 : 0;
  localparam int unsigned ROWS_RANDOM   = 400;

  logic          clk = 1'b0;
  logic          rst;
  logic [N-1:0]  bypass;
  data_t         din, dout;
  instr_t        iin, iout;
  video_t        vin, vout;
  logic          vin_vld, vout_vld;

  // din_w/dout_w are the words as sent and received; on the bus, bits
  // 23..12 travel one clock and bits 35..24 two clocks after bits 11..0
  data_t  din_w, din_w1, din_w2, dout_w, dout_1, dout_2;
  instr_t iout_w, iout_1, iout_2;
  always @(posedge clk) begin
    din_w1 <= din_w; din_w2 <= din_w1;
    dout_1 <= dout;  dout_2 <= dout_1;
    iout_1 <= iout;  iout_2 <= iout_1;
  end
  assign din    = SKEW ? {din_w2[35:24], din_w1[23:12], din_w[11:0]} : din_w;
  assign dout_w = SKEW ? {dout[35:24], dout_1[23:12], dout_2[11:0]} : dout;
  assign iout_w = SKEW ? iout_2 : iout;

  sag_engine #(.GROUP_Y(1'b0)) dut (
    .clk(clk), .rst(rst), .bypass(bypass),
    .din(din), .iin(iin), .vin(vin), .vin_vld(vin_vld),
    .dout(dout), .iout(iout), .vout(vout), .vout_vld(vout_vld)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ mechanisms
  typedef enum int {
    M_REF, M_EVAL0, M_EVAL1, M_EVAL2, M_SETI, M_SETDI, M_SETDDI, M_SETP_REPEAT,
    M_DIS_SUPPRESS, M_NEG_SKIPPED, M_NEG_ACCUM, M_EMPTY_RANGE, M_BYPASS,
    M_RANGE_EXITS, M_NOP, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"REF", "EVAL0", "EVAL1", "EVAL2", "SETI/SETPI used",
    "SETDI/SETPDI used", "SETDDI/SETPDDI used", "SETP* periodic repeat",
    "DIS suppressed pixel", "negative intensity skipped", "negative intensity accumulated",
    "empty range (DX=0)", "bypassed PE", "range leaves last PE", "NOP"};

  // ------------------------------------------------------------ model
  typedef struct {
    op_e   op;
    int    x, dx;
    data_t ddi, di, i;
  } ins_t;

  data_t m_p [N];
  data_t m_a [N], m_b [N], m_c [N];
  bit    m_av [N], m_bv [N], m_cv [N], m_dis [N], m_neg [N];
  int    cols;                 // working columns
  int    col_pe [N];           // physical PE of each column

  // expected pixel stream
  video_t exp_pix [$];
  longint exp_cyc [$];
  // expected packets at dout, one per non-NOP packet, in order
  typedef struct { op_e op; bit chk_x; bit chk_all; ast_e st; data_t d [5]; } pkt_exp_t;
  pkt_exp_t exp_out [$];

  function automatic video_t vid(data_t p);
    if (p[35]) return 12'd0;
    return p[34:23];
  endfunction

  function automatic void model_reset();
    for (int q = 0; q < N; q++) begin
      m_p[q] = '0; m_av[q] = 0; m_bv[q] = 0; m_cv[q] = 0; m_dis[q] = 0; m_neg[q] = 1;
    end
  endfunction

  function automatic void set_cols(logic [N-1:0] byp);
    cols = 0;
    for (int k = 0; k < N; k++) if (!byp[k]) begin col_pe[cols] = k; cols++; end
  endfunction

  // Apply one instruction to the model. Pixel columns are 1-based: column
  // q is model index q-1.
  function automatic void model_apply(ins_t s, longint ddi_cycle);
    pkt_exp_t pe;
    pe.op = s.op; pe.chk_x = 0; pe.chk_all = 0; pe.st = ST_SEEK;
    for (int k = 0; k < 5; k++) pe.d[k] = '0;
    case (s.op)
      OP_NOP: mech[M_NOP]++;
      OP_REF: begin
        mech[M_REF]++;
        for (int q = 0; q < cols; q++) begin
          exp_pix.push_back(vid(m_p[q]));
          exp_cyc.push_back(ddi_cycle + N + col_pe[q] + 1 + VID_EXTRA);
        end
        model_reset();
      end
      OP_ACC_M: for (int q = 0; q < N; q++) m_neg[q] = !m_neg[q];
      OP_SETI, OP_SETDI, OP_SETDDI, OP_SETPI, OP_SETPDI, OP_SETPDDI: begin
        int q = s.x;
        int n = 0;
        while (q < cols) begin
          case (s.op)
            OP_SETI, OP_SETPI:     begin m_a[q] = s.i;   m_av[q] = 1; end
            OP_SETDI, OP_SETPDI:   begin m_b[q] = s.di;  m_bv[q] = 1; end
            default:               begin m_c[q] = s.ddi; m_cv[q] = 1; end
          endcase
          n++;
          if (s.op inside {OP_SETI, OP_SETDI, OP_SETDDI} || s.dx == 0) break;
          q += s.dx;
        end
        if (n > 1) mech[M_SETP_REPEAT]++;
      end
      OP_DIS, OP_EVAL0, OP_EVAL1, OP_EVAL2: begin
        data_t i = s.i;
        data_t di = (s.op inside {OP_EVAL1, OP_EVAL2}) ? s.di : '0;
        data_t ddi = (s.op == OP_EVAL2) ? s.ddi : '0;
        if (s.dx == 0 && s.x < cols) mech[M_EMPTY_RANGE]++;
        if (s.op == OP_EVAL0) mech[M_EVAL0]++;
        if (s.op == OP_EVAL1) mech[M_EVAL1]++;
        if (s.op == OP_EVAL2) mech[M_EVAL2]++;
        for (int q = s.x; q < s.x + s.dx && q < cols; q++) begin
          if (s.op == OP_DIS) begin
            m_dis[q] = 1;
          end else begin
            if (m_cv[q] && s.op == OP_EVAL2) begin ddi = m_c[q]; mech[M_SETDDI]++; end
            if (m_bv[q] && s.op != OP_EVAL0) begin di = m_b[q]; mech[M_SETDI]++; end
            if (m_av[q]) begin i = m_a[q]; mech[M_SETI]++; end
            if (m_dis[q]) mech[M_DIS_SUPPRESS]++;
            else if (i[35] && !m_neg[q]) mech[M_NEG_SKIPPED]++;
            else begin
              if (i[35]) mech[M_NEG_ACCUM]++;
              m_p[q] = m_p[q] + i;
            end
            m_av[q] = 0; m_bv[q] = 0; m_cv[q] = 0; m_dis[q] = 0;
            i = i + di;
            di = di + ddi;
          end
        end
        // words leaving the last PE, for a range still open there
        if (s.op != OP_DIS && s.dx > 0 && s.x < cols && s.x + s.dx > cols) begin
          mech[M_RANGE_EXITS]++;
          pe.chk_x = 1; pe.chk_all = 1; pe.st = ST_ACTIVE;
          pe.d[0] = data_t'((s.x + s.dx - cols) & 'hFFF); pe.d[1] = data_t'((s.dx) & 'hFFF);
          pe.d[2] = ddi; pe.d[3] = di; pe.d[4] = i;
        end
      end
      default: ;
    endcase
    // a packet that never found its start leaves with X reduced by the
    // number of working columns
    if (s.op inside {OP_EVAL0, OP_EVAL1, OP_EVAL2, OP_DIS, OP_SETI, OP_SETDI,
                     OP_SETDDI, OP_SETPI, OP_SETPDI, OP_SETPDDI} && s.x >= cols) begin
      pe.chk_x = 1; pe.st = ST_SEEK; pe.d[0] = data_t'((s.x - cols) & 'hFFF);
    end
    if (s.op != OP_NOP) exp_out.push_back(pe);
  endfunction

  // ------------------------------------------------------------ driver
  task automatic send(ins_t s);
    data_t w [5];
    longint ddi_cycle;
    w[0] = data_t'((s.x) & 'hFFF); w[1] = data_t'((s.dx) & 'hFFF);
    w[2] = s.ddi; w[3] = s.di; w[4] = s.i;
    for (int k = 0; k < 5; k++) begin
      din_w <= w[k];
      iin <= '{op: s.op, slot: slot_e'(k), st: ST_SEEK, rsvd: 3'b000};
      @(posedge clk);
      if (k == 2) ddi_cycle = cycle;   // index of the edge that loads the DDI word
    end
    model_apply(s, ddi_cycle);
  endtask

  function automatic ins_t mk(op_e op, int x, int dx, data_t ddi, data_t di, data_t i);
    ins_t s;
    s.op = op; s.x = x; s.dx = dx; s.ddi = ddi; s.di = di; s.i = i;
    return s;
  endfunction

  // intensity n + f/256 in the 36-bit format (23 fraction bits)
  function automatic data_t fx(int n, int f = 0);
    return data_t'((longint'(n) <<< 23) + (longint'(f) <<< 15));
  endfunction

  task automatic row_end(int used);
    if (cols < N) mech[M_BYPASS]++;
    // pad so that every row is at least 3 packets (>= N clocks) long
    for (int k = used; k < 3; k++) send(mk(OP_NOP, 0, 0, '0, '0, '0));
    send(mk(OP_REF, 0, 0, '0, '0, '0));
  endtask

  // change the faulty-PE mask once the array holds only NOPs
  task automatic set_bypass(logic [N-1:0] m);
    for (int k = 0; k < 5; k++) send(mk(OP_NOP, 0, 0, '0, '0, '0));
    bypass <= m;
    set_cols(m);
  endtask

  function automatic data_t rnd_val(int mag);
    int v = int'($urandom_range(0, 2 * mag)) - mag;
    return fx(v, int'($urandom_range(0, 255)));
  endfunction

  // ------------------------------------------------------------ monitor
  int pix_seen = 0;
  pkt_exp_t cur_out;
  always @(posedge clk) if (!rst) begin
    if (vout_vld) begin
      checks++;
      if (exp_pix.size() == 0) begin
        failures++;
        $display("FAIL unexpected pixel %0d at cycle %0d", vout, cycle);
      end else begin
        video_t e;
        longint ec;
        e  = exp_pix.pop_front();
        ec = exp_cyc.pop_front();
        if (vout !== e || cycle != ec) begin
          failures++;
          $display("FAIL pixel %0d: got %0d at cycle %0d, want %0d at cycle %0d",
                   pix_seen, vout, cycle, e, ec);
        end
      end
      pix_seen++;
    end
    // words leaving the array
    if (iout_w.op != OP_NOP) begin
      if (iout_w.slot == SLOT_X) begin
        if (exp_out.size() == 0) begin
          failures++;
          $display("FAIL unexpected packet %s at dout_w", iout_w.op.name());
        end else begin
          cur_out = exp_out.pop_front();
          checks++;
          if (cur_out.op !== iout_w.op) begin
            failures++;
            $display("FAIL packet order at dout_w: got %s, want %s", iout_w.op.name(), cur_out.op.name());
          end
        end
      end
      if ((iout_w.slot == SLOT_X && cur_out.chk_x) || cur_out.chk_all) begin
        checks++;
        if (dout_w !== cur_out.d[iout_w.slot] || iout_w.st !== cur_out.st) begin
          failures++;
          $display("FAIL dout_w %s slot %0d: got %h st=%0d, want %h st=%0d", iout_w.op.name(),
                   iout_w.slot, dout_w, iout_w.st, cur_out.d[iout_w.slot], cur_out.st);
        end
      end
    end
  end

  // ------------------------------------------------------------ watchdog
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    ins_t s;
    rst = 1'b1; bypass = '0; din_w = '0; iin = INSTR_NOP; vin = '0; vin_vld = 1'b0;
    model_reset();
    set_cols(bypass);
    repeat (4) @(posedge clk);
    rst <= 1'b0;

    // row 0: REF of the empty row
    row_end(0);

    // row 1: constant, linear and quadratic segments, and one EVAL that
    // starts beyond the last column
    send(mk(OP_EVAL0, 0, 2, '0, '0, fx(100)));
    send(mk(OP_EVAL1, 2, 3, '0, fx(10), fx(200)));
    send(mk(OP_EVAL2, 5, 4, fx(1, 128), fx(-3), fx(50)));
    send(mk(OP_EVAL0, 20, 3, '0, '0, fx(7)));
    row_end(4);

    // row 2: corrections (Phong-like second-derivative changes), an empty
    // range and a range that runs past the last column
    send(mk(OP_SETDDI, 3, 0, fx(-2), '0, '0));
    send(mk(OP_SETDI, 5, 0, '0, fx(4), '0));
    send(mk(OP_SETI, 1, 0, '0, '0, fx(333)));
    send(mk(OP_EVAL2, 0, 6, fx(1), fx(2), fx(10)));
    send(mk(OP_EVAL1, 6, 0, '0, fx(1), fx(1)));
    send(mk(OP_EVAL2, 6, 20, fx(0, 64), fx(1), fx(20)));
    row_end(6);

    // row 3: periodic corrections, a hole cut with DIS, back-facing part
    send(mk(OP_SETPDI, 0, 3, '0, fx(5), '0));
    send(mk(OP_SETPI, 1, 4, '0, '0, fx(9)));
    send(mk(OP_SETPDDI, 2, 2, fx(3), '0, '0));
    send(mk(OP_DIS, 3, 2, '0, '0, '0));
    send(mk(OP_EVAL2, 0, 9, fx(0), fx(-1), fx(2)));
    row_end(5);

    // row 4: negative intensities with and without ACC_M
    send(mk(OP_EVAL1, 0, 4, '0, fx(-40), fx(30)));
    send(mk(OP_ACC_M, 0, 0, '0, '0, '0));
    send(mk(OP_EVAL1, 4, 5, '0, fx(-40), fx(30)));
    send(mk(OP_ACC_M, 0, 0, '0, '0, '0));
    send(mk(OP_EVAL0, 6, 2, '0, '0, fx(-5)));
    row_end(5);

    // row 5..: a faulty PE is bypassed; the row shrinks by one column
    set_bypass(9'b000010100);
    send(mk(OP_EVAL1, 0, 9, '0, fx(3), fx(11)));
    send(mk(OP_SETPI, 0, 2, '0, '0, fx(1)));
    row_end(2);
    send(mk(OP_EVAL2, 1, 5, fx(2), fx(-1), fx(8)));
    send(mk(OP_EVAL0, 12, 3, '0, '0, fx(1)));
    row_end(2);
    set_bypass('0);
    row_end(0);

    // random rows
    for (int r = 0; r < ROWS_RANDOM; r++) begin
      int n;
      n = int'($urandom_range(1, 7));
      if (r == ROWS_RANDOM / 2) begin
        set_bypass(N'(1 << $urandom_range(0, N - 1)));
        row_end(0);
      end
      for (int k = 0; k < n; k++) begin
        op_e op;
        op = op_e'($urandom_range(2, 12));
        s = mk(op, int'($urandom_range(0, 10)), int'($urandom_range(0, 6)),
               rnd_val(3), rnd_val(20), rnd_val(200));
        send(s);
      end
      row_end(n);
    end

    // flush
    for (int k = 0; k < 8; k++) send(mk(OP_NOP, 0, 0, '0, '0, '0));

    checks++;
    if (exp_pix.size() != 0) begin
      failures++;
      $display("FAIL %0d pixels never arrived", exp_pix.size());
    end
    checks++;
    if (exp_out.size() != 0) begin
      failures++;
      $display("FAIL %0d output words never seen", exp_out.size());
    end
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-32s : %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
