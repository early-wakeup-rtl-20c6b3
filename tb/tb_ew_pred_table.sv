// tb_ew_pred_table: random reads and writes against a reference model of the
// PC-indexed table (valid bit, set index, way number per entry), checking the
// one-cycle read latency, that an empty entry misses, that aliasing PCs share
// an entry, that outputs hold without a read, and read-before-write.
module tb_ew_pred_table;
  localparam int N = 64, SW = 9, WW = 1, IW = 6;
  logic clk = 1'b0, rst_n;
  logic rd_en, wr_en, rd_hit;
  logic [31:0] rd_pc, wr_pc;
  logic [SW-1:0] rd_set, wr_set;
  logic [WW-1:0] rd_way, wr_way;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  bit          m_valid [N];
  logic [SW-1:0] m_set [N];
  logic [WW-1:0] m_way [N];
  bit          e_hit;
  logic [SW-1:0] e_set;
  logic [WW-1:0] e_way;

  always #5 clk = ~clk;

  ew_pred_table #(.ENTRIES(N), .ADDR_W(32), .SET_W(SW), .WAY_W(WW)) dut (
    .clk, .rst_n, .rd_en, .rd_pc, .rd_hit, .rd_set, .rd_way, .wr_en, .wr_pc, .wr_set, .wr_way);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; rd_en = 0; wr_en = 0; rd_pc = 0; wr_pc = 0; wr_set = 0; wr_way = 0;
    for (int i = 0; i < N; i++) m_valid[i] = 0;
    e_hit = 0; e_set = 0; e_way = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int ri, wi;
      rd_en  = ($urandom % 4) != 0;
      wr_en  = ($urandom % 3) == 0;
      // PCs from a 4 KB code region (aliasing over the 64-entry table)
      rd_pc  = 32'h0040_0000 + (($urandom % 1024) << 2) + (i < 10 ? 0 : ($urandom % 4));
      wr_pc  = ($urandom % 2) ? rd_pc : 32'h0040_0000 + (($urandom % 1024) << 2);
      wr_set = SW'($urandom);
      wr_way = WW'($urandom);
      ri = int'(rd_pc[2 +: IW]);
      wi = int'(wr_pc[2 +: IW]);
      if (rd_en) begin   // read-before-write
        e_hit = m_valid[ri]; e_set = m_set[ri]; e_way = m_way[ri];
      end
      if (wr_en) begin
        m_valid[wi] = 1; m_set[wi] = wr_set; m_way[wi] = wr_way;
      end
      @(negedge clk);
      checks++;
      if (rd_hit !== e_hit || (e_hit && (rd_set !== e_set || rd_way !== e_way))) begin
        failures++;
        $display("FAIL step %0d: got %0b/%0d/%0d expected %0b/%0d/%0d", i,
                 rd_hit, rd_set, rd_way, e_hit, e_set, e_way);
      end
      if (rd_en && e_hit) hits++;
      if (rd_en && !e_hit) misses++;
    end
    checks++;
    if (hits < 100 || misses < 10) begin failures++; $display("FAIL coverage hits=%0d misses=%0d", hits, misses); end
    // reset empties the table
    rst_n = 0; @(negedge clk); rst_n = 1;
    rd_en = 1; wr_en = 0; rd_pc = 32'h0040_0000; @(negedge clk);
    checks++;
    if (rd_hit) begin failures++; $display("FAIL hit after reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
