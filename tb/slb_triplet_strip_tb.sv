// slb_triplet_strip_tb: checks the OR coincidence of the triplet strips with its two
// identical logics of two candidates each.
module slb_triplet_strip_tb;
  localparam int NCH = 32;
  logic [NCH-1:0] inner, outer;
  logic [3:0]     valid;
  logic [4:0]     pos [4];
  int checks = 0, failures = 0;

  slb_triplet_strip #(.NCH(NCH), .NCAND(2)) dut (.inner(inner), .outer(outer), .valid(valid), .pos(pos));

  task automatic check_model();
    for (int h = 0; h < 2; h++) begin
      int list[$];
      for (int i = h*16; i < h*16 + 16; i++) if (inner[i] || outer[i]) list.push_back(i);
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (c < list.size()) begin
          if (!valid[h*2+c] || int'(pos[h*2+c]) != list[c]) begin
            failures++; $display("FAIL slot %0d exp %0d got %0b/%0d", h*2+c, list[c], valid[h*2+c], pos[h*2+c]);
          end
        end else if (valid[h*2+c]) begin
          failures++; $display("FAIL slot %0d should be empty", h*2+c);
        end
      end
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    inner = '0; outer = '0; outer[20] = 1; #1; check_model();
    checks++; if (valid != 4'b0100 || pos[2] != 20) failures++;
    inner = 32'h0003_0003; outer = '0; #1; check_model();
    checks++; if (valid != 4'b1111) failures++;
    for (int n = 0; n < 3000; n++) begin
      inner = '0; outer = '0;
      for (int k = 0; k < $urandom_range(4); k++) inner[$urandom_range(NCH-1)] = 1;
      for (int k = 0; k < $urandom_range(4); k++) outer[$urandom_range(NCH-1)] = 1;
      #1; check_model();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
