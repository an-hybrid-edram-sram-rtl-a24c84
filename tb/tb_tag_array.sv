// Self-checking test of the tag array: reset state (invalid, ptr = age = entry
// number), whole-set writes landing in the addressed set only, and reads of
// every set against a reference copy.
module tb_tag_array;
  localparam int SETS = 8, WAYS = 4, TW = 10, WW = 2;
  int checks = 0, failures = 0;

  logic                    clk = 0, rst_n = 0;
  logic [2:0]              rd_idx, wr_idx;
  logic [WAYS-1:0]         rd_valid, rd_dirty, wr_valid, wr_dirty;
  logic [WAYS-1:0][TW-1:0] rd_tag, wr_tag;
  logic [WAYS-1:0][WW-1:0] rd_ptr, rd_age, wr_ptr, wr_age;
  logic                    we;

  tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WAYS-1:0]         m_valid [SETS], m_dirty [SETS];
  logic [WAYS-1:0][TW-1:0] m_tag   [SETS];
  logic [WAYS-1:0][WW-1:0] m_ptr   [SETS], m_age [SETS];

  task automatic compare_all();
    for (int s = 0; s < SETS; s++) begin
      rd_idx = 3'(s); #1;
      checks++;
      if (rd_valid !== m_valid[s] || rd_dirty !== m_dirty[s] || rd_ptr !== m_ptr[s] ||
          rd_age !== m_age[s] || (m_valid[s] != 0 && rd_tag !== m_tag[s])) begin
        failures++;
        $display("FAIL set %0d: v=%b d=%b p=%h a=%h", s, rd_valid, rd_dirty, rd_ptr, rd_age);
      end
    end
  endtask

  initial begin
    we = 0; wr_idx = 0; wr_valid = 0; wr_dirty = 0; wr_tag = 0; wr_ptr = 0; wr_age = 0; rd_idx = 0;
    for (int s = 0; s < SETS; s++) begin
      m_valid[s] = 0; m_dirty[s] = 0; m_tag[s] = 0;
      m_ptr[s] = {2'd3, 2'd2, 2'd1, 2'd0};
      m_age[s] = {2'd3, 2'd2, 2'd1, 2'd0};
    end
    #12 rst_n = 1;
    compare_all();
    for (int n = 0; n < 100; n++) begin
      int s, p[4];
      s = $urandom_range(SETS - 1);
      p = '{0, 1, 2, 3};
      p.shuffle();
      @(negedge clk);
      we = 1; wr_idx = 3'(s);
      wr_valid = 4'($urandom); wr_dirty = 4'($urandom);
      for (int e = 0; e < WAYS; e++) begin
        wr_tag[e] = TW'($urandom);
        wr_ptr[e] = WW'(p[e]);
        wr_age[e] = WW'($urandom);
      end
      m_valid[s] = wr_valid; m_dirty[s] = wr_dirty; m_tag[s] = wr_tag;
      m_ptr[s] = wr_ptr; m_age[s] = wr_age;
      @(negedge clk);
      we = 0;
      if (n % 10 == 9) compare_all();
    end
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
