// tb_serial_divider: self-checking test of the serial divider. Random and
// corner operands (zero dividend, zero divisor, divisor 1, equal operands)
// are divided; the quotient must equal floor(a/b) (all ones for b = 0 and
// a > 0, zero for 0/0) and
// done must come exactly W cycles after start.
module tb_serial_divider;
  localparam int W = 7;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [W-1:0] dividend, divisor, quotient;
  serial_divider #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    start = 0; dividend = 0; divisor = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      int a, b, lat, expq;
      case (it)
        0: begin a = 0;   b = 5;   end
        1: begin a = 17;  b = 0;   end
        5: begin a = 0;   b = 0;   end
        2: begin a = 127; b = 1;   end
        3: begin a = 96;  b = 96;  end
        4: begin a = 127; b = 127; end
        default: begin a = $urandom_range(127, 0); b = $urandom_range(it % 2 ? 127 : 9, 0); end
      endcase
      dividend = W'(a); divisor = W'(b); start = 1;
      @(posedge clk); #1;
      start = 0; dividend = W'($urandom); divisor = W'($urandom);
      lat = 0;
      while (!done && lat < 50) begin @(posedge clk); #1; lat++; end
      expq = (b == 0) ? ((a == 0) ? 0 : (1 << W) - 1) : a / b;
      check(lat == W, $sformatf("latency %0d", lat));
      check(int'(quotient) == expq, $sformatf("%0d/%0d = %0d exp %0d", a, b, quotient, expq));
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
