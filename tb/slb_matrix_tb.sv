// slb_matrix_tb: checks one slave-board matrix half against a reference model.
// Random sparse pivot/reference patterns and hand-made single tracks; the model searches
// displacements outward from 0 (negative first) and lists the matching pivot rows.
module slb_matrix_tb;
  localparam int NPIV = 32, MAXD = 7;
  logic [NPIV-1:0]        pivot;
  logic [NPIV+2*MAXD-1:0] refer;
  logic                   valid;
  logic [3:0]             delta;
  logic [NPIV-1:0]        row_hit;
  int checks = 0, failures = 0;

  slb_matrix dut (.pivot(pivot), .refer(refer), .valid(valid), .delta(delta), .row_hit(row_hit));

  task automatic check_model();
    logic e_valid; int e_d; logic [NPIV-1:0] e_rows;
    e_valid = 0; e_d = 0; e_rows = '0;
    for (int a = 0; a <= MAXD && !e_valid; a++) begin
      foreach (pivot[i]) if (pivot[i] && refer[i+MAXD-a]) begin e_valid = 1; e_d = -a; end
      if (!e_valid) foreach (pivot[i]) if (pivot[i] && refer[i+MAXD+a]) begin e_valid = 1; e_d = a; end
    end
    if (e_valid) foreach (pivot[i]) e_rows[i] = pivot[i] && refer[i+MAXD+e_d];
    checks++;
    if (valid !== e_valid || (e_valid && ($signed(delta) != e_d || row_hit !== e_rows))) begin
      failures++;
      $display("FAIL piv=%h ref=%h got v=%0b d=%0d rows=%h exp v=%0b d=%0d rows=%h",
               pivot, refer, valid, $signed(delta), row_hit, e_valid, e_d, e_rows);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // single straight-line tracks at every pivot channel and displacement
    for (int p = 0; p < NPIV; p++)
      for (int d = -MAXD; d <= MAXD; d++) begin
        pivot = '0; refer = '0;
        pivot[p] = 1'b1; refer[p+MAXD+d] = 1'b1;
        #1;
        check_model();
        checks++;
        if (!valid || $signed(delta) != d || row_hit != (32'b1 << p)) failures++;
      end
    // no reference hit: nothing
    pivot = '1; refer = '0; #1; checks++; if (valid) failures++;
    // random sparse patterns
    for (int n = 0; n < 3000; n++) begin
      pivot = '0; refer = '0;
      for (int k = 0; k < 1 + $urandom_range(3); k++) pivot[$urandom_range(NPIV-1)] = 1'b1;
      for (int k = 0; k < $urandom_range(4); k++) refer[$urandom_range(NPIV+2*MAXD-1)] = 1'b1;
      #1;
      check_model();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
