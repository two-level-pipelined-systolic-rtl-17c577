// tb_sag_pe: directed test of a single processing element.
//
// Each case sends one five-word packet (or a short sequence) with a chosen
// incoming address state and compares the five words that leave the PE,
// their state tags and their two-clock latency with values worked out by
// hand from the instruction semantics. Pixel contents are read back with
// REF on the video output, one clock after REF's DDI word is processed.
// Covered: address decrement, start hit with DX reload, end of range,
// in-range interpolation for EVAL0/1/2, DX = 0, SET*/SETP* corrections,
// DIS, ACC_M, REF reset and bypass.
module tb_sag_pe;
  import sag_pkg::*;

  logic   clk = 1'b0;
  logic   rst, bypass;
  data_t  din, dout;
  instr_t iin, iout;
  video_t vin, vout;
  logic   vin_vld, vout_vld;

  sag_pe dut (
    .clk(clk), .rst(rst), .bypass(bypass), .din(din), .iin(iin),
    .vin(vin), .vin_vld(vin_vld), .dout(dout), .iout(iout),
    .vout(vout), .vout_vld(vout_vld)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { instr_t i; data_t d; longint c; } obs_t;
  obs_t   outq [$];
  video_t vidq [$];
  longint vidc [$];
  longint last_ddi_edge;

  always @(posedge clk) if (!rst) begin
    if (iout.op != OP_NOP) outq.push_back('{iout, dout, cycle});
    if (vout_vld) begin vidq.push_back(vout); vidc.push_back(cycle); end
  end

  function automatic data_t fx(int n);
    return data_t'(longint'(n) <<< 23);
  endfunction

  longint first_edge;
  task automatic send(op_e op, ast_e st, int x, int dx, data_t ddi, data_t di, data_t i);
    data_t w [5];
    w[0] = data_t'((x) & 'hFFF); w[1] = data_t'((dx) & 'hFFF); w[2] = ddi; w[3] = di; w[4] = i;
    for (int k = 0; k < 5; k++) begin
      din <= w[k];
      iin <= '{op: op, slot: slot_e'(k), st: st, rsvd: 3'b000};
      @(posedge clk);
      if (k == 0) first_edge = cycle;
      if (k == 2) last_ddi_edge = cycle;
    end
    din <= '0;
    iin <= INSTR_NOP;
    repeat (3) @(posedge clk);
  endtask

  task automatic expect_pkt(string tag, ast_e st, int x, data_t ddi, data_t di, data_t i, int dx = -1);
    data_t w [5];
    w[0] = data_t'((x) & 'hFFF); w[2] = ddi; w[3] = di; w[4] = i;
    for (int k = 0; k < 5; k++) begin
      obs_t o;
      checks++;
      if (outq.size() == 0) begin
        failures++;
        $display("FAIL %s: word %0d missing", tag, k);
        continue;
      end
      o = outq.pop_front();
      if (o.i.slot != slot_e'(k) || o.i.st != st || (k != 1 && o.d !== w[k]) ||
          (k == 1 && dx >= 0 && o.d !== data_t'((dx) & 'hFFF)) || o.c != first_edge + 2 + k) begin
        failures++;
        $display("FAIL %s: word %0d got %h st=%0d slot=%0d at %0d, want %h st=%0d at %0d",
                 tag, k, o.d, o.i.st, o.i.slot, o.c, w[k], st, first_edge + 2 + k);
      end
    end
  endtask

  // send REF and compare the pixel it reads out
  task automatic expect_pixel(string tag, int v);
    send(OP_REF, ST_SEEK, 0, 0, '0, '0, '0);
    void'(outq.pop_front()); void'(outq.pop_front()); void'(outq.pop_front());
    void'(outq.pop_front()); void'(outq.pop_front());
    checks++;
    if (vidq.size() != 1) begin
      failures++;
      $display("FAIL %s: %0d pixels read", tag, vidq.size());
      vidq.delete(); vidc.delete();
    end else begin
      video_t p = vidq.pop_front();
      longint c = vidc.pop_front();
      if (p !== video_t'(v) || c != last_ddi_edge + 2) begin
        failures++;
        $display("FAIL %s: pixel %0d at %0d, want %0d at %0d", tag, p, c, v, last_ddi_edge + 2);
      end
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; bypass = 1'b0; din = '0; iin = INSTR_NOP; vin = 12'h5A5; vin_vld = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);

    // 1. not here yet: X decremented, everything else unchanged
    send(OP_EVAL1, ST_SEEK, 5, 3, fx(1), fx(2), fx(3));
    expect_pkt("seek", ST_SEEK, 4, fx(1), fx(2), fx(3), 3);
    // 2. start of range: X becomes DX - 1, DI + DDI and I + DI leave
    send(OP_EVAL2, ST_SEEK, 0, 3, fx(1), fx(2), fx(30));
    expect_pkt("start", ST_ACTIVE, 2, fx(1), fx(3), fx(32), 3);
    expect_pixel("start pixel", 30);
    // 3. inside the range
    send(OP_EVAL1, ST_ACTIVE, 2, 7, fx(9), fx(-4), fx(50));
    expect_pkt("inside", ST_ACTIVE, 1, '0, fx(-4), fx(46), 7);
    // 4. end of range: not accumulated, packet done
    send(OP_EVAL0, ST_ACTIVE, 0, 7, '0, '0, fx(100));
    expect_pkt("end", ST_DONE, 12'hFFF, '0, '0, fx(100), 7);
    // 5. done packets pass unchanged (no decrement either)
    send(OP_EVAL0, ST_DONE, 0, 7, '0, '0, fx(100));
    expect_pkt("done", ST_DONE, 0, '0, '0, fx(100), 7);
    expect_pixel("inside pixel", 50);
    // 6. EVAL0 zero-order: DI and DDI leave as zero
    send(OP_EVAL0, ST_SEEK, 0, 2, fx(5), fx(6), fx(7));
    expect_pkt("eval0", ST_ACTIVE, 1, '0, '0, fx(7), 2);
    // 7. accumulation across two EVALs before REF
    send(OP_EVAL0, ST_SEEK, 0, 1, '0, '0, fx(8));
    expect_pkt("eval0 b", ST_ACTIVE, 0, '0, '0, fx(8), 1);
    expect_pixel("sum of two", 15);
    // 8. DX = 0: empty range
    send(OP_EVAL0, ST_SEEK, 0, 0, '0, '0, fx(9));
    expect_pkt("empty", ST_DONE, 12'hFFF, '0, '0, fx(9), 0);
    expect_pixel("empty pixel", 0);
    // 9. corrections replace I, DI, DDI at this pixel and are used once
    send(OP_SETDDI, ST_SEEK, 0, 0, fx(4), '0, '0);
    expect_pkt("setddi", ST_DONE, 12'hFFF, fx(4), '0, '0, 0);
    send(OP_SETPDI, ST_SEEK, 0, 5, '0, fx(10), '0);
    expect_pkt("setpdi", ST_SEEK, 4, '0, fx(10), '0, 5);
    send(OP_SETI, ST_SEEK, 0, 0, '0, '0, fx(70));
    expect_pkt("seti", ST_DONE, 12'hFFF, '0, '0, fx(70), 0);
    send(OP_EVAL2, ST_SEEK, 0, 2, fx(1), fx(1), fx(1));
    expect_pkt("corrected", ST_ACTIVE, 1, fx(4), fx(14), fx(80), 2);
    send(OP_EVAL2, ST_SEEK, 0, 2, fx(1), fx(1), fx(1));
    expect_pkt("used up", ST_ACTIVE, 1, fx(1), fx(2), fx(2), 2);
    expect_pixel("corrected pixel", 71);
    // 10. SET that is not for this PE leaves nothing behind
    send(OP_SETI, ST_SEEK, 1, 0, '0, '0, fx(70));
    expect_pkt("seti far", ST_SEEK, 0, '0, '0, fx(70), 0);
    send(OP_EVAL0, ST_SEEK, 0, 1, '0, '0, fx(3));
    expect_pkt("eval after far", ST_ACTIVE, 0, '0, '0, fx(3), 1);
    expect_pixel("no correction", 3);
    // 11. DIS blocks the next EVAL here, once
    send(OP_DIS, ST_SEEK, 0, 1, '0, '0, '0);
    expect_pkt("dis", ST_ACTIVE, 0, '0, '0, '0, 1);
    send(OP_EVAL0, ST_SEEK, 0, 1, '0, '0, fx(40));
    expect_pkt("eval dis", ST_ACTIVE, 0, '0, '0, fx(40), 1);
    send(OP_EVAL0, ST_SEEK, 0, 1, '0, '0, fx(6));
    expect_pkt("eval after dis", ST_ACTIVE, 0, '0, '0, fx(6), 1);
    expect_pixel("dis pixel", 6);
    // 12. negative intensities: accumulated by default, not after ACC_M
    send(OP_EVAL0, ST_SEEK, 0, 1, '0, '0, fx(20));
    expect_pkt("pos", ST_ACTIVE, 0, '0, '0, fx(20), 1);
    send(OP_EVAL0, ST_SEEK, 0, 1, '0, '0, fx(-5));
    expect_pkt("neg", ST_ACTIVE, 0, '0, '0, fx(-5), 1);
    send(OP_ACC_M, ST_SEEK, 0, 0, '0, '0, '0);
    expect_pkt("accm", ST_SEEK, 0, '0, '0, '0, 0);
    send(OP_EVAL0, ST_SEEK, 0, 1, '0, '0, fx(-7));
    expect_pkt("neg off", ST_ACTIVE, 0, '0, '0, fx(-7), 1);
    expect_pixel("neg pixel", 15);
    // REF restored the default: negatives count again; a negative pixel shows 0
    send(OP_EVAL0, ST_SEEK, 0, 1, '0, '0, fx(-7));
    expect_pkt("neg after ref", ST_ACTIVE, 0, '0, '0, fx(-7), 1);
    expect_pixel("negative pixel", 0);
    // 13. bypass: no decrement, no accumulation, video passes through
    bypass <= 1'b1;
    vin_vld <= 1'b1;
    @(posedge clk);
    @(posedge clk);
    checks++;
    if (!vout_vld || vout !== 12'h5A5) begin
      failures++;
      $display("FAIL bypass video: %h %b", vout, vout_vld);
    end
    vin_vld <= 1'b0;
    vidq.delete(); vidc.delete();
    send(OP_EVAL1, ST_SEEK, 0, 3, fx(1), fx(2), fx(3));
    expect_pkt("bypass", ST_SEEK, 0, fx(1), fx(2), fx(3), 3);
    bypass <= 1'b0;
    @(posedge clk);
    vidq.delete(); vidc.delete();
    expect_pixel("bypass pixel", 0);

    checks++;
    if (outq.size() != 0) begin
      failures++;
      $display("FAIL %0d extra output words", outq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
