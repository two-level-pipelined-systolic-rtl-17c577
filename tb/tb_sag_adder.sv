// tb_sag_adder: self-checking test of the 36-bit ripple adder and its C12
// tap. Random and corner operands are compared with the simulator's own
// wide addition; C12 is compared with the carry of the 12-bit low parts and
// with the "X = 0" rule used for address decoding (X + all-ones).
module tb_sag_adder;

  localparam int unsigned W = 36;

  logic [W-1:0] a, b, sum;
  logic         cin, cout, c_tap;
  int checks = 0, failures = 0;

  sag_adder #(.W(W), .TAP_BIT(12)) dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .c_tap(c_tap)
  );

  task automatic check_one(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0]  full;
    logic [12:0] low;
    a = ta; b = tb_; cin = tc;
    #1;
    full = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    low  = {1'b0, ta[11:0]} + {1'b0, tb_[11:0]} + 13'(tc);
    checks++;
    if ({cout, sum} !== full || c_tap !== low[12]) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b: got %b_%h tap=%b, want %h tap=%b",
               ta, tb_, tc, cout, sum, c_tap, full, low[12]);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // address decrement: C12 is 0 exactly when X = 0
    for (int x = 0; x < 4096; x += 1) begin
      check_one(W'(x), '1, 1'b0);
      checks++;
      if (c_tap !== (x != 0)) begin
        failures++;
        $display("FAIL C12 for X=%0d", x);
      end
    end
    check_one('1, '1, 1'b1);
    check_one('1, '0, 1'b1);
    check_one({1'b0, {(W-1){1'b1}}}, 1, 1'b0);
    for (int i = 0; i < 3000; i++)
      check_one({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
