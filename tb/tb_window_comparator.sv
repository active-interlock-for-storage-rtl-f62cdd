// tb_window_comparator: exhaustive check of the window comparator over a
// range that covers both bounds, plus random values across the full signed
// range. The reference is an integer comparison done in the testbench.
module tb_window_comparator;
  localparam int W = 16;
  localparam int LO = -300;
  localparam int HI = 1250;

  logic signed [W-1:0] value;
  logic in_window;
  int checks = 0, failures = 0;

  window_comparator #(.W(W), .LO(W'(LO)), .HI(W'(HI))) dut (.value, .in_window);

  task automatic check(int v);
    bit expected;
    value = W'(v);
    #1;
    expected = (v >= LO) && (v <= HI);
    checks++;
    if (in_window !== expected) begin
      failures++;
      $display("FAIL value=%0d in_window=%0b expected=%0b", v, in_window, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = LO - 40; v <= LO + 40; v++) check(v);
    for (int v = HI - 40; v <= HI + 40; v++) check(v);
    check(-32768);
    check(32767);
    check(0);
    repeat (2000) check($signed(W'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
