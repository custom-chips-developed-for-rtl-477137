// hpt_sel2of6_tb: checks the 2-out-of-6 select against a sort: the two valid candidates
// with the smallest |delta| (lower index first on ties), in order.
module hpt_sel2of6_tb;
  import tgc_pkg::*;
  hpt_cand_t cand [6];
  hpt_cand_t sel  [2];
  int checks = 0, failures = 0;

  hpt_sel2of6 dut (.cand(cand), .sel(sel));

  task automatic check_model();
    int order [$];
    for (int i = 0; i < 6; i++) if (cand[i].valid) order.push_back(i);
    // insertion sort by |delta|, stable on index
    for (int i = 1; i < order.size(); i++)
      for (int j = i; j > 0; j--) begin
        int a, b;
        a = $signed(cand[order[j-1]].delta); a = a < 0 ? -a : a;
        b = $signed(cand[order[j]].delta);   b = b < 0 ? -b : b;
        if (b < a) begin int t; t = order[j]; order[j] = order[j-1]; order[j-1] = t; end
      end
    for (int s = 0; s < 2; s++) begin
      checks++;
      if (s < order.size()) begin
        if (sel[s] !== cand[order[s]]) begin failures++; $display("FAIL sel%0d got blk %0d exp %0d", s, sel[s].blk, order[s]); end
      end else if (sel[s].valid) begin
        failures++; $display("FAIL sel%0d should be empty", s);
      end
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 6; i++) begin
        cand[i].valid = ($urandom_range(2) != 0);
        cand[i].high  = 1'b1;
        cand[i].blk   = 3'(i);
        cand[i].pos   = 5'($urandom);
        cand[i].delta = 5'(int'($urandom_range(30)) - 15);
      end
      #1; check_model();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
