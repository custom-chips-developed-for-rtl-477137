// pp_bcid_tb: drives random discriminator pulses of 1..6 crossings on 16 channels and
// checks that each enabled channel gives exactly one one-crossing pulse, one clock after the
// crossing in which its pulse starts, and that masked channels stay silent.
module pp_bcid_tb;
  localparam int NCH = 16;
  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] hit_in, mask, hit_out, prev_in, exp_out;
  int len [NCH];
  int checks = 0, failures = 0;

  pp_bcid #(.NCH(NCH)) dut (.clk(clk), .rst_n(rst_n), .hit_in(hit_in), .mask(mask), .hit_out(hit_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    hit_in = '0; mask = '1; prev_in = '0; exp_out = '0;
    foreach (len[i]) len[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (hit_out !== exp_out) begin failures++; if (failures < 10) $display("FAIL n=%0d got %h exp %h", n, hit_out, exp_out); end
      if (n % 500 == 0) mask = 16'($urandom);
      prev_in = hit_in;
      for (int i = 0; i < NCH; i++) begin
        if (len[i] > 0) len[i]--;
        else if ($urandom_range(7) == 0) len[i] = 1 + $urandom_range(5);
        else len[i] = -$urandom_range(2);   // gap
        hit_in[i] = (len[i] > 0);
      end
      exp_out = hit_in & ~prev_in & mask;  // appears after the next edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
