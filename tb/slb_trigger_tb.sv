// slb_trigger_tb: checks the trigger block in all four modes: pin mapping, slot layout and
// the result of each scheme for known tracks and random patterns (doublet reference model:
// closest-to-diagonal displacement, then the middle of the first run of matching pivots).
module slb_trigger_tb;
  import tgc_pkg::*;
  slb_mode_e          mode;
  logic [SLB_NIN-1:0] hit;
  slb_trig_t          trig;
  int checks = 0, failures = 0;

  slb_trigger dut (.mode(mode), .hit(hit), .trig(trig));

  task automatic expect_slot(int s, logic v, int data);
    checks++;
    if (trig[s].valid !== v || (v && int'(trig[s].data) != data)) begin
      failures++;
      $display("FAIL mode=%s slot %0d got %0b/%h exp %0b/%h", mode.name(), s, trig[s].valid, trig[s].data, v, data);
    end
  endtask

  task automatic doublet_model();
    for (int b = 0; b < 2; b++) begin
      logic v; int d, s, e; logic [31:0] rows;
      v = 0; d = 0; rows = '0;
      for (int a = 0; a <= 7 && !v; a++)
        for (int sg = 0; sg < 2; sg++) if (!v) begin
          int dd; dd = (sg == 0) ? -a : a;
          for (int i = 0; i < 32; i++)
            if (hit[b*32+i] && hit[64 + b*32 + i + 7 + dd]) begin v = 1; d = dd; end
        end
      if (v) for (int i = 0; i < 32; i++) rows[i] = hit[b*32+i] && hit[64 + b*32 + i + 7 + d];
      s = 0; for (int i = 31; i >= 0; i--) if (rows[i]) s = i;
      e = s; while (e < 31 && rows[e+1]) e++;
      expect_slot(b, v, v ? (((d & 15) << 5) | ((s + e) / 2)) : 0);
    end
    expect_slot(2, 0, 0); expect_slot(3, 0, 0);
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // doublet: 3-wide clusters in half B shifted by -3; the closest pair (pivot 10, ref 9) wins
    mode = MODE_DOUBLET_WIRE; hit = '0;
    hit[32+10] = 1; hit[32+11] = 1; hit[32+12] = 1;
    hit[64+32+10+7-3] = 1; hit[64+32+11+7-3] = 1; hit[64+32+12+7-3] = 1;
    #1; expect_slot(1, 1, ((-1 & 15) << 5) | 10); expect_slot(0, 0, 0); doublet_model();
    mode = MODE_DOUBLET_STRIP; #1; expect_slot(1, 1, ((-1 & 15) << 5) | 10);
    for (int n = 0; n < 2000; n++) begin
      hit = '0;
      for (int k = 0; k < $urandom_range(4); k++) hit[$urandom_range(63)] = 1;
      for (int k = 0; k < $urandom_range(5); k++) hit[64 + $urandom_range(77)] = 1;
      mode = ($urandom_range(1) == 0) ? MODE_DOUBLET_WIRE : MODE_DOUBLET_STRIP;
      #1; doublet_model();
    end
    // triplet wire: planes at [35:0], [71:36], [107:72]
    mode = MODE_TRIPLET_WIRE; hit = '0;
    hit[5] = 1; hit[36+5] = 1;        // planes 1+2 at channel 5
    hit[36+20] = 1; hit[72+20] = 1;   // planes 2+3 at channel 20
    hit[30] = 1;                      // single plane only
    hit[72+33] = 1; hit[33] = 1;      // planes 1+3 at channel 33
    #1; expect_slot(0, 1, 5); expect_slot(1, 1, 20); expect_slot(2, 1, 33); expect_slot(3, 0, 0);
    // triplet strip: inner [31:0], outer [63:32]
    mode = MODE_TRIPLET_STRIP; hit = '0;
    hit[3] = 1; hit[32+9] = 1; hit[32+14] = 1; hit[17] = 1;
    #1; expect_slot(0, 1, 3); expect_slot(1, 1, 9); expect_slot(2, 1, 17); expect_slot(3, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
