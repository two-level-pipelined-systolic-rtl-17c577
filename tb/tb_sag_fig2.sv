// tb_sag_fig2: shading workloads on the default engine (nine deeply
// pipelined PEs; data words are sent with their section skew, the bits of
// carry section j j clocks after the tag). Each row shades one span of 4*DX pixels starting at column
// X1 with one of the classic instruction sequences:
//   row 1  Constant shading          EVAL0
//   row 2  Gouraud shading           EVAL1
//   row 3  Phong by second order     SETDDI at X2 and X4, then EVAL2
//   row 4  Gouraud with a hole       DIS from X2 for DX pixels, then EVAL1
//   row 5  Gouraud, slope changes    SETDI at X2 and X4, then EVAL1
// with X1 = 1, DX = 2, X2 = X1 + DX, X4 = X1 + 3*DX. The expected pixels are
// computed here in real arithmetic from the closed form of each shading
// (constant, arithmetic series, piecewise quadratic); all operands are
// multiples of 1/256 so the fixed-point results are exact. A column outside
// the span must stay black.
module tb_sag_fig2;
  import sag_pkg::*;

  localparam int N  = 9;
  localparam int X1 = 1, DX = 2, X2 = X1 + DX, X4 = X1 + 3 * DX;

  logic          clk = 1'b0;
  logic          rst;
  logic [N-1:0]  bypass = '0;
  data_t         din, dout, din_w;
  data_t         din_h [9];      // element j: din_w delayed j clocks
  instr_t        iin, iout;
  video_t        vout;
  logic          vout_vld;

  // carry sections of the PE, LSB first: 3, 5, 4, 3, 5, 4, 3, 5, 4 bits
  function automatic int sec_of(int b);
    int lo [9];
    int r;
    lo = '{0, 3, 8, 12, 15, 20, 24, 27, 32};
    r = 0;
    for (int j = 0; j < 9; j++) if (b >= lo[j]) r = j;
    return r;
  endfunction

  always @(posedge clk) begin
    din_h[1] <= din_w;
    for (int j = 8; j > 1; j--) din_h[j] <= din_h[j-1];
  end
  always_comb begin
    for (int b = 0; b < 36; b++) begin
      int j;
      j = sec_of(b);
      din[b] = (j == 0) ? din_w[b] : din_h[j][b];
    end
  end

  sag_engine dut (
    .clk(clk), .rst(rst), .bypass(bypass), .din(din), .iin(iin),
    .vin('0), .vin_vld(1'b0), .dout(dout), .iout(iout), .vout(vout), .vout_vld(vout_vld)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  video_t got [$];
  always @(posedge clk) if (!rst && vout_vld) got.push_back(vout);

  function automatic data_t fx(real v);
    return data_t'(longint'(v * 256.0) <<< 15);
  endfunction

  task automatic send(op_e op, int x, int dx, real ddi, real di, real i);
    data_t w [5];
    w[0] = data_t'(x[11:0]); w[1] = data_t'(dx[11:0]);
    w[2] = fx(ddi); w[3] = fx(di); w[4] = fx(i);
    for (int k = 0; k < 5; k++) begin
      din_w <= w[k];
      iin   <= '{op: op, slot: slot_e'(k), st: ST_SEEK, rsvd: 3'b000};
      @(posedge clk);
    end
  endtask

  // read the row out and compare with expected intensities per column
  task automatic ref_and_check(string name, real exp_v [N]);
    send(OP_NOP, 0, 0, 0, 0, 0);
    send(OP_NOP, 0, 0, 0, 0, 0);
    got.delete();
    send(OP_REF, 0, 0, 0, 0, 0);
    repeat (10) send(OP_NOP, 0, 0, 0, 0, 0);
    checks++;
    if (got.size() != N) begin
      failures++;
      $display("FAIL %s: %0d pixels", name, got.size());
      foreach (got[q]) $write(" %0d", got[q]);
      $write("\n");
      return;
    end
    for (int q = 0; q < N; q++) begin
      int e = (exp_v[q] < 0.0) ? 0 : int'($floor(exp_v[q]));
      checks++;
      if (got[q] != video_t'(e)) begin
        failures++;
        $display("FAIL %s column %0d: got %0d, want %0d", name, q + 1, got[q], e);
      end
    end
    $write("%-22s:", name);
    for (int q = 0; q < N; q++) $write(" %4d", got[q]);
    $write("\n");
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e [N];
    real i0, d0, dd0, dd1, dd2, d1, d2, v, d, dd;
    rst = 1'b1; din_w = '0; iin = INSTR_NOP;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    send(OP_REF, 0, 0, 0, 0, 0);                 // clear the row
    repeat (10) send(OP_NOP, 0, 0, 0, 0, 0);

    // Constant shading
    send(OP_EVAL0, X1 - 1, 4 * DX, 0, 0, 140.5);
    for (int q = 1; q <= N; q++) e[q-1] = (q >= X1 && q < X1 + 4 * DX) ? 140.5 : 0.0;
    ref_and_check("constant", e);

    // Gouraud shading: I(q) = I + (q - X1) * DI
    i0 = 20.0; d0 = 12.5;
    send(OP_EVAL1, X1 - 1, 4 * DX, 0, d0, i0);
    for (int q = 1; q <= N; q++)
      e[q-1] = (q >= X1 && q < X1 + 4 * DX) ? i0 + (q - X1) * d0 : 0.0;
    ref_and_check("gouraud", e);

    // Phong approximated by second-order interpolation with DDI changes at
    // X2 and X4: within each piece I is quadratic in the column
    i0 = 30.0; d0 = 20.0; dd0 = -1.5; dd1 = -4.25; dd2 = 2.0;
    send(OP_SETDDI, X2 - 1, 0, dd1, 0, 0);
    send(OP_SETDDI, X4 - 1, 0, dd2, 0, 0);
    send(OP_EVAL2, X1 - 1, 4 * DX, dd0, d0, i0);
    for (int q = 1; q <= N; q++) begin
      // closed form piece by piece: start values of a piece at column s,
      // I(s + n) = I(s) + n*D(s) + n(n-1)/2 * DD
      real is, ds; int s, n;
      if (q < X1 || q >= X1 + 4 * DX) begin e[q-1] = 0.0; continue; end
      is = i0; ds = d0; s = X1;
      if (q >= X2) begin
        n = X2 - X1; is = is + n * ds + n * (n - 1) / 2.0 * dd0; ds = ds + n * dd0; s = X2;
      end
      if (q >= X4) begin
        n = X4 - X2; is = is + n * ds + n * (n - 1) / 2.0 * dd1; ds = ds + n * dd1; s = X4;
      end
      n = q - s;
      dd = (q >= X4) ? dd2 : (q >= X2) ? dd1 : dd0;
      e[q-1] = is + n * ds + n * (n - 1) / 2.0 * dd;
    end
    ref_and_check("phong (2nd order)", e);

    // Gouraud with a hole from X2 for DX pixels
    i0 = 200.0; d0 = -7.75;
    send(OP_DIS, X2 - 1, DX, 0, 0, 0);
    send(OP_EVAL1, X1 - 1, 4 * DX, 0, d0, i0);
    for (int q = 1; q <= N; q++)
      e[q-1] = (q >= X1 && q < X1 + 4 * DX && !(q >= X2 && q < X2 + DX)) ? i0 + (q - X1) * d0 : 0.0;
    ref_and_check("gouraud with hole", e);

    // Gouraud with first-derivative changes at X2 and X4 (piecewise linear)
    i0 = 10.0; d0 = 3.0; d1 = 25.5; d2 = -11.0;
    send(OP_SETDI, X2 - 1, 0, 0, d1, 0);
    send(OP_SETDI, X4 - 1, 0, 0, d2, 0);
    send(OP_EVAL1, X1 - 1, 4 * DX, 0, d0, i0);
    for (int q = 1; q <= N; q++) begin
      if (q < X1 || q >= X1 + 4 * DX) begin e[q-1] = 0.0; continue; end
      if (q < X2)      v = i0 + (q - X1) * d0;
      else if (q < X4) v = i0 + (X2 - X1) * d0 + (q - X2) * d1;
      else             v = i0 + (X2 - X1) * d0 + (X4 - X2) * d1 + (q - X4) * d2;
      e[q-1] = v;
    end
    ref_and_check("gouraud, DI changes", e);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
