// tb_weight_memory: checks the six-bank weight memory and its bank mux.
//
// Small banks (64 rows each, 6 banks, 16-bit rows). Writes every global row,
// then reads random global rows back-to-back (crossing banks every cycle)
// while writing, and checks one-cycle latency and the bank multiplexer.
module tb_weight_memory;
  localparam int NB = 6, ROWS = 64, WIDTH = 16, AW = 9;

  logic clk = 0, re = 0, we = 0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [WIDTH-1:0] rdata, wdata = '0;
  logic [WIDTH-1:0] ref_mem [NB*ROWS];
  int checks = 0, failures = 0;
  int banks_seen [NB];

  weight_memory #(.N_BANKS(NB), .ROWS(ROWS), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    for (int r = 0; r < NB*ROWS; r++) begin
      we = 1; waddr = AW'(r); wdata = 16'($urandom); ref_mem[r] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int n = 0; n < 10000; n++) begin
      logic [WIDTH-1:0] exp;
      re = ($urandom % 5 != 0);
      raddr = AW'($urandom % (NB*ROWS));
      we = ($urandom % 2 == 0);
      waddr = AW'($urandom % (NB*ROWS));
      wdata = 16'($urandom);
      exp = re ? ref_mem[raddr] : rdata;
      if (re) banks_seen[raddr / ROWS]++;
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
      checks++;
      if (rdata !== exp) begin failures++; $display("cycle %0d: rdata %h expected %h", n, rdata, exp); end
    end
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (banks_seen[b] == 0) begin failures++; $display("bank %0d never read", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
