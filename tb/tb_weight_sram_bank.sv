// tb_weight_sram_bank: checks one weight bank at full size (8192 x 128).
//
// Fills every row, reads random rows with the read port while writing
// other rows through the write port, and checks one-cycle read latency,
// that rdata holds when re is low, and that a read of the row being written
// in the same cycle returns the old contents.
module tb_weight_sram_bank;
  localparam int ROWS = 8192, WIDTH = 128;

  logic clk = 0, re = 0, we = 0;
  logic [12:0] raddr = '0, waddr = '0;
  logic [WIDTH-1:0] rdata, wdata = '0;
  logic [WIDTH-1:0] ref_mem [ROWS];
  int checks = 0, failures = 0;

  weight_sram_bank #(.ROWS(ROWS), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    @(posedge clk); #1;
    for (int r = 0; r < ROWS; r++) begin
      we = 1; waddr = 13'(r); wdata = rnd(); ref_mem[r] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int n = 0; n < 20000; n++) begin
      logic [WIDTH-1:0] exp;
      re = ($urandom % 4 != 0);
      raddr = 13'($urandom);
      we = ($urandom % 2 == 0);
      waddr = (n % 5 == 0) ? raddr : 13'($urandom);
      wdata = rnd();
      exp = re ? ref_mem[raddr] : rdata;
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
      checks++;
      if (rdata !== exp) begin failures++; $display("cycle %0d: rdata mismatch", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
