// tb_fmu_ram: self-checking testbench for fmu_ram.
//
// Fills the memory, then issues random writes and reads (many to the same
// few addresses, often in the same cycle) and compares each read word with
// a model array. Checks the one-cycle read latency and that a read in the
// same cycle as a write to the same address returns the old word.
module tb_fmu_ram;
  localparam int unsigned WIDTH = 33;
  localparam int unsigned DEPTH = 2048;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic wr_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] expect_q;
  logic expect_v = 1'b0;
  int checks = 0, failures = 0, same_cycle = 0;

  always #5 clk = ~clk;

  fmu_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = {$urandom, 1'($urandom)};
      model[a] = wr_data;
    end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      // check the read issued in the previous cycle
      if (expect_v) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++; $display("FAIL: read %h expected %h", rd_data, expect_q);
        end
      end
      wr_en   = ($urandom_range(0, 1) == 1);
      wr_addr = ($urandom_range(0, 1) == 1) ? AW'($urandom_range(0, 3)) : AW'($urandom);
      wr_data = {$urandom, 1'($urandom)};
      rd_addr = ($urandom_range(0, 1) == 1) ? AW'($urandom_range(0, 3)) : AW'($urandom);
      if (wr_en && wr_addr == rd_addr) same_cycle++;
      expect_q = model[rd_addr];       // old word, before this cycle's write
      expect_v = 1'b1;
      if (wr_en) model[wr_addr] = wr_data;
    end
    checks++;
    if (same_cycle == 0) begin failures++; $display("FAIL: no read-during-write seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
