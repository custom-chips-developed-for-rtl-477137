// hpt_matrix_block_tb: checks one high-pT matrix block: a single triplet column at every
// displacement in and outside the wire and strip windows, and random column patterns
// against a closest-to-diagonal reference model.
module hpt_matrix_block_tb;
  localparam int NPOS = 32, MAXD = 15;
  logic                  row_valid;
  logic [4:0]            row_pos;
  logic [NPOS+2*MAXD-1:0] cols;
  logic [4:0]            maxd;
  logic                  valid;
  logic [4:0]            delta;
  int checks = 0, failures = 0;

  hpt_matrix_block #(.NPOS(NPOS), .MAXD(MAXD)) dut (.row_valid(row_valid), .row_pos(row_pos),
    .cols(cols), .maxd(maxd), .valid(valid), .delta(delta));

  task automatic check_model();
    logic v; int d;
    v = 0; d = 0;
    if (row_valid)
      for (int a = 0; a <= int'(maxd) && !v; a++) begin
        if (cols[int'(row_pos) + MAXD - a]) begin v = 1; d = -a; end
        else if (cols[int'(row_pos) + MAXD + a]) begin v = 1; d = a; end
      end
    checks++;
    if (valid !== v || (v && $signed(delta) != d)) begin
      failures++;
      $display("FAIL pos=%0d maxd=%0d got %0b/%0d exp %0b/%0d", row_pos, maxd, valid, $signed(delta), v, d);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    row_valid = 1;
    for (int w = 0; w < 2; w++) begin
      maxd = (w == 0) ? 5'd15 : 5'd7;
      for (int p = 0; p < NPOS; p++)
        for (int d = -MAXD; d <= MAXD; d++) begin
          row_valid = 1; row_pos = 5'(p); cols = '0; cols[p + MAXD + d] = 1;
          #1; check_model();
          checks++;
          begin
            int ad; logic inwin; ad = (d < 0) ? -d : d; inwin = (ad <= int'(maxd));
            if (valid !== inwin) begin failures++; $display("FAIL window p=%0d d=%0d valid=%0b inwin=%0b cols=%h rv=%0b pos=%0d", p, d, valid, inwin, cols, row_valid, row_pos); end
          end
        end
    end
    row_valid = 0; cols = '1; #1; check_model();
    row_valid = 1;
    for (int n = 0; n < 3000; n++) begin
      maxd = ($urandom_range(1) == 0) ? 5'd15 : 5'd7;
      row_pos = 5'($urandom_range(31));
      cols = '0;
      for (int k = 0; k < $urandom_range(4); k++) cols[$urandom_range(NPOS+2*MAXD-1)] = 1;
      #1; check_model();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
