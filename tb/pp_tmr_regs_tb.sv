// pp_tmr_regs_tb: writes and reads the triplicated registers, then flips bits of one copy
// at a time: the voted value must never change, the upset must be flagged and repaired, and
// a second upset of another copy after the repair must be masked as well.
module pp_tmr_regs_tb;
  localparam int NREG = 4, W = 16;
  logic clk = 0, rst_n = 0;
  logic         we, inj_en, seu_seen;
  logic [1:0]   addr, inj_addr, inj_copy;
  logic [W-1:0] wdata, rdata, inj_mask;
  logic [W-1:0] q [NREG];
  logic [W-1:0] model [NREG];
  int checks = 0, failures = 0, n_seu = 0;

  pp_tmr_regs #(.NREG(NREG), .W(W)) dut (.clk(clk), .rst_n(rst_n), .we(we), .addr(addr), .wdata(wdata),
    .rdata(rdata), .q(q), .seu_seen(seu_seen), .inj_en(inj_en), .inj_copy(inj_copy),
    .inj_addr(inj_addr), .inj_mask(inj_mask));

  always #5 clk = ~clk;
  always @(posedge clk) if (seu_seen) n_seu++;

  task automatic check_all();
    for (int r = 0; r < NREG; r++) begin
      addr = 2'(r); #1;
      checks += 2;
      if (rdata !== model[r]) begin failures++; $display("FAIL read reg %0d got %h exp %h", r, rdata, model[r]); end
      if (q[r] !== model[r]) begin failures++; $display("FAIL q reg %0d", r); end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; inj_en = 0; addr = 0; inj_addr = 0; inj_copy = 0; wdata = 0; inj_mask = 0;
    for (int r = 0; r < NREG; r++) model[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check_all();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = 0; inj_en = 0;
      case ($urandom_range(2))
        0: begin we = 1; addr = 2'($urandom); wdata = W'($urandom); model[addr] = wdata; end
        1: begin inj_en = 1; inj_copy = 2'($urandom_range(2)); inj_addr = 2'($urandom); inj_mask = W'($urandom) | 1; end
        default: ;
      endcase
      @(negedge clk);
      we = 0; inj_en = 0;
      check_all();
    end
    // upset in copy 0, repair, upset in copy 1 of the same bits: value must stay
    @(negedge clk); inj_en = 1; inj_copy = 0; inj_addr = 2; inj_mask = 16'hffff;
    @(negedge clk); inj_en = 1; inj_copy = 1; inj_addr = 2; inj_mask = 16'hffff;
    @(negedge clk); inj_en = 0;
    @(negedge clk); check_all();
    checks++; if (n_seu == 0) begin failures++; $display("FAIL upsets never flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
