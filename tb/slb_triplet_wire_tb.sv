// slb_triplet_wire_tb: checks the 2-out-of-3 triplet wire coincidence and the reporting of
// the first three firing channels.
module slb_triplet_wire_tb;
  localparam int NCH = 36;
  logic [NCH-1:0] pa, pb, pc;
  logic [2:0]     valid;
  logic [5:0]     pos [3];
  int checks = 0, failures = 0;

  slb_triplet_wire #(.NCH(NCH), .NCAND(3)) dut (.pa(pa), .pb(pb), .pc(pc), .valid(valid), .pos(pos));

  task automatic check_model();
    int list[$];
    for (int i = 0; i < NCH; i++)
      if (int'(pa[i]) + int'(pb[i]) + int'(pc[i]) >= 2) list.push_back(i);
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (c < list.size()) begin
        if (!valid[c] || int'(pos[c]) != list[c]) begin
          failures++; $display("FAIL slot %0d got %0b/%0d exp %0d", c, valid[c], pos[c], list[c]);
        end
      end else if (valid[c]) begin
        failures++; $display("FAIL slot %0d should be empty", c);
      end
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // one plane only never fires, any two do
    pa = '1; pb = '0; pc = '0; #1; check_model(); checks++; if (valid != 0) failures++;
    pa = '0; pb = '0; pc = '0; pb[35] = 1; pc[35] = 1; #1; check_model();
    checks++; if (!valid[0] || pos[0] != 35) failures++;
    for (int n = 0; n < 3000; n++) begin
      pa = '0; pb = '0; pc = '0;
      for (int k = 0; k < $urandom_range(6); k++) pa[$urandom_range(NCH-1)] = 1;
      for (int k = 0; k < $urandom_range(6); k++) pb[$urandom_range(NCH-1)] = 1;
      for (int k = 0; k < $urandom_range(6); k++) pc[$urandom_range(NCH-1)] = 1;
      #1; check_model();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
