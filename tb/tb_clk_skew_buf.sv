// tb_clk_skew_buf: for every 3-bit skew code, measures the delay between
// rising (and falling) edges of the input clock and of the delayed clock and
// checks it equals code * 50 time units (half of the default 100-unit
// half-adder delay). Codes are changed only while the clock is quiet.
module tb_clk_skew_buf;
  logic       clk_in = 1'b0;
  logic [2:0] code;
  logic       clk_out;
  int checks = 0, failures = 0;

  clk_skew_buf dut (.clk_in(clk_in), .code(code), .clk_out(clk_out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t_in, t_out;
    for (int c = 0; c < 8; c++) begin
      code = 3'(c);
      #1000;
      for (int e = 0; e < 4; e++) begin
        clk_in = ~clk_in;
        t_in = $time;
        @(clk_out);
        t_out = $time;
        checks++;
        if (clk_out != clk_in || (t_out - t_in) != time'(c * 50)) begin
          failures++;
          $display("FAIL code %0d edge %0d delay %0t", c, e, t_out - t_in);
        end
        #1000;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
