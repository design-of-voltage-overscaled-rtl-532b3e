// tb_vit_decoder: end-to-end test of the Viterbi decoder. Random information
// bits are encoded here with the rate-1/2, constraint-length-8 code
// (generators 247 and 371 octal), mapped to 2-bit soft values (3 = '1',
// 0 = '0'), and disturbed: a fraction of soft values is weakened to 1 or 2,
// and isolated symbols are flipped outright. The decoder must return the
// information bits exactly, each one 169 accepted symbols after its own
// symbol, through random stalls.
module tb_vit_decoder;
  import vos_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst, in_valid, out_valid, out_bit;
  logic [1:0] r0, r1;
  vos_level_e lvl [6];

  vit_decoder dut (.clk(clk), .rst(rst), .in_valid(in_valid), .r0(r0), .r1(r1),
                   .out_valid(out_valid), .out_bit(out_bit), .mem_lvl(lvl));

  localparam int NSYM = 3000;
  bit u [NSYM];
  int n_in = 0, n_out = 0, n_flip = 0, n_stall = 0;

  function automatic int code_word(int s, int uu);
    int r;
    r = uu << 7;
    for (int i = 0; i < 7; i++) if ((s >> i) & 1) r |= 1 << (6 - i);
    return ($countones(r & 'o371) & 1) * 2 + ($countones(r & 'o247) & 1);
  endfunction

  function automatic logic [1:0] soft_val(int c);
    int v;
    v = c ? 3 : 0;
    if ($urandom_range(0, 9) == 0) v = c ? 2 : 1;  // weak but right
    return 2'(v);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, w, last_flip;
    s = 0; last_flip = -100;
    rst = 1'b1; in_valid = 1'b0; r0 = '0; r1 = '0;
    for (int i = 0; i < NSYM; i++) u[i] = 1'($urandom);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    while (n_in < NSYM) begin
      in_valid = ($urandom_range(0, 7) != 0);
      if (!in_valid) n_stall++;
      if (in_valid) begin
        w  = code_word(s, int'(u[n_in]));
        r0 = soft_val(w & 1);
        r1 = soft_val((w >> 1) & 1);
        // one hard symbol error at most every 40 symbols
        if (n_in - last_flip > 40 && $urandom_range(0, 19) == 0) begin
          r0 = ~r0;
          last_flip = n_in;
          n_flip++;
        end
      end
      #1;
      if (out_valid) begin
        checks++;
        if (n_in < 169 || out_bit != u[n_in - 169]) begin
          failures++;
          if (failures < 10) $display("FAIL bit at input %0d", n_in);
        end
        n_out++;
      end
      @(posedge clk);
      if (in_valid) begin
        s = ((s << 1) | int'(u[n_in])) & 127;
        n_in++;
      end
      #1;
    end
    checks++;
    if (n_out != NSYM - 169 || n_flip == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL counts out=%0d flips=%0d stalls=%0d", n_out, n_flip, n_stall);
    end
    $display("decoded %0d bits, %0d channel flips, %0d stalls", n_out, n_flip, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
