// tb_coarse_delay: self-checking test of the bunch-crossing delay line.
//
// A strobe every 5 cycles (one 25 ns crossing at 200 MHz) shifts in a
// random byte. For delays 0, 1, 7, 31 and random values, dout one cycle
// after each strobe must equal the byte shifted in 'delay' strobes
// earlier (delay 0: the byte of this strobe), and dout must not change
// between strobes.
module tb_coarse_delay;
  localparam int DEPTH = 32;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       bc_strobe;
  logic [4:0] delay;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  coarse_delay #(.W(8), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .bc_strobe(bc_strobe), .delay(delay), .din(din), .dout(dout));

  always #2.5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] hist [DEPTH];   // hist[0] = newest byte shifted in

  initial begin
    bc_strobe = 1'b0; delay = '0; din = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < DEPTH; i++) hist[i] = 8'h00;
    for (int n = 0; n < 600; n++) begin
      logic [7:0] v;
      int d;
      if (n % 100 == 0) begin
        case (n / 100)
          0: d = 0;  1: d = 1;  2: d = 7;  3: d = 31;
          default: d = $urandom_range(DEPTH - 1, 0);
        endcase
        delay <= 5'(d);
      end
      v = 8'($urandom());
      din <= v; bc_strobe <= 1'b1;
      @(posedge clk); #1;
      bc_strobe <= 1'b0;
      for (int i = DEPTH - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = v;
      begin
        logic [7:0] exp_v;
        int di;
        di = int'(delay);
        exp_v = hist[di];
        check(dout == exp_v, $sformatf("strobe %0d delay %0d: %02h expected %02h",
                                       n, delay, dout, exp_v));
      end
      repeat (4) begin
        logic [7:0] held;
        held = dout;
        @(posedge clk); #1;
        check(dout == held, "dout changed between strobes");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
