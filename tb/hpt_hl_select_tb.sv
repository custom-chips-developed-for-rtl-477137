// hpt_hl_select_tb: checks the HH, HL and LL combinations of the H/L select.
module hpt_hl_select_tb;
  import tgc_pkg::*;
  hpt_cand_t hi [2], lo [2], out [2];
  int checks = 0, failures = 0;

  hpt_hl_select dut (.hi(hi), .lo(lo), .out(out));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int nh;
      nh = $urandom_range(2);
      for (int s = 0; s < 2; s++) begin
        hi[s] = hpt_cand_t'($urandom); hi[s].high = 1; hi[s].valid = (s < nh);
        lo[s] = hpt_cand_t'($urandom); lo[s].high = 0; lo[s].valid = ($urandom_range(1) == 1);
      end
      if (!lo[0].valid) lo[1].valid = 0;
      #1;
      checks += 2;
      case (nh)
        2: begin if (out[0] !== hi[0]) failures++; if (out[1] !== hi[1]) failures++; end
        1: begin if (out[0] !== hi[0]) failures++; if (out[1] !== lo[0]) failures++; end
        default: begin if (out[0] !== lo[0]) failures++; if (out[1] !== lo[1]) failures++; end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
