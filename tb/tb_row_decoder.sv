// Self-checking test of row_decoder: for every index and every combination of
// the three row control inputs, exactly the addressed row must see WL_s, WL_d
// and S2D, and every other row must see nothing.
module tb_row_decoder;
  localparam int SETS = 8, WAYS = 4;
  int checks = 0, failures = 0;

  logic [2:0]       idx;
  logic             wl_s_in;
  logic [WAYS-1:1]  wl_d_in, s2d_in;
  logic [SETS-1:0]  wl_s;
  logic [WAYS-1:1]  wl_d [SETS];
  logic [WAYS-1:1]  s2d  [SETS];

  row_decoder #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < SETS; i++)
      for (int c = 0; c < 128; c++) begin
        idx     = 3'(i);
        wl_s_in = c[0];
        wl_d_in = c[3:1];
        s2d_in  = c[6:4];
        #1;
        for (int r = 0; r < SETS; r++) begin
          checks++;
          if (r == i) begin
            if (wl_s[r] !== c[0] || wl_d[r] !== c[3:1] || s2d[r] !== c[6:4]) begin
              failures++;
              $display("FAIL row %0d selected: wl_s=%b wl_d=%b s2d=%b c=%0d", r, wl_s[r], wl_d[r], s2d[r], c);
            end
          end else if (wl_s[r] || wl_d[r] != 0 || s2d[r] != 0) begin
            failures++;
            $display("FAIL row %0d not selected but driven (idx %0d c %0d)", r, i, c);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
