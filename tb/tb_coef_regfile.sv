// tb_coef_regfile: checks the coefficient register file at full size.
//
// CGS-16 sizing: 384 entries of 48 bits (eight 6-bit block-column indices).
// Writes every entry, reads all back combinationally, then overwrites random
// entries and rechecks the whole file.
module tb_coef_regfile;
  localparam int ENTRIES = 384, EW = 48;

  logic clk = 0, we = 0;
  logic [8:0] waddr = '0, raddr = '0;
  logic [EW-1:0] wdata = '0, rdata;
  logic [EW-1:0] ref_rf [ENTRIES];
  int checks = 0, failures = 0;

  coef_regfile #(.N_NEURONS(1024), .N_SEL(128), .BLOCK(16), .N_HIDDEN(4), .N_OUT_ROWS(2048)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int e = 0; e < ENTRIES; e++) begin
      raddr = 9'(e);
      #1;
      checks++;
      if (rdata !== ref_rf[e]) begin failures++; $display("entry %0d wrong", e); end
    end
  endtask

  initial begin
    @(posedge clk); #1;
    for (int e = 0; e < ENTRIES; e++) begin
      we = 1; waddr = 9'(e); wdata = {16'($urandom), $urandom}; ref_rf[e] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    check_all();
    for (int n = 0; n < 20; n++) begin
      for (int k = 0; k < 10; k++) begin
        we = 1; waddr = 9'($urandom % ENTRIES); wdata = {16'($urandom), $urandom};
        ref_rf[waddr] = wdata;
        @(posedge clk); #1;
      end
      we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
