// slb_decluster_tb: checks the decluster/32-5 encoder: the middle channel of the first run
// of consecutive hits, lower middle for even runs.
module slb_decluster_tb;
  localparam int N = 32;
  logic [N-1:0] hits;
  logic         valid;
  logic [4:0]   pos;
  int checks = 0, failures = 0;

  slb_decluster #(.N(N)) dut (.hits(hits), .valid(valid), .pos(pos));

  task automatic check_model();
    int s, e;
    s = -1; e = -1;
    for (int i = 0; i < N; i++) if (hits[i]) begin s = i; break; end
    if (s >= 0) begin e = s; while (e + 1 < N && hits[e+1]) e++; end
    checks++;
    if (valid !== (s >= 0) || (s >= 0 && int'(pos) != (s + e) / 2)) begin
      failures++;
      $display("FAIL hits=%b got v=%0b pos=%0d exp start=%0d end=%0d", hits, valid, pos, s, e);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    hits = '0; #1; check_model();
    hits = 32'b0111_0000; #1; check_model(); checks++; if (pos != 5) failures++;
    hits = 32'b1111_0000; #1; check_model(); checks++; if (pos != 5) failures++;
    hits = 32'h8000_0000; #1; check_model(); checks++; if (pos != 31) failures++;
    hits = 32'h0000_0f03; #1; check_model(); checks++; if (pos != 0) failures++;
    for (int n = 0; n < 3000; n++) begin
      hits = '0;
      for (int k = 0; k < $urandom_range(3); k++) begin
        int st, ln;
        st = $urandom_range(N-1); ln = 1 + $urandom_range(4);
        for (int j = st; j < st + ln && j < N; j++) hits[j] = 1'b1;
      end
      #1; check_model();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
