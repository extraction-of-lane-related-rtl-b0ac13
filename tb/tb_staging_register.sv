// tb_staging_register: streams lines of random pixel columns with random
// gaps and checks, after every accepted column, that the nine latches hold
// the last three columns (Z1..Z3 from line N, Z4..Z6 from N-1, Z7..Z9
// from N-2, newest in Z1/Z4/Z7) and that the output enable is high exactly
// from the third column of each line on.
module tb_staging_register;
  import lane_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, sol = 1'b0;
  pix_t n0 = '0, n1 = '0, n2 = '0;
  window_t z;
  logic oe;
  int checks = 0, failures = 0;
  int oe_count = 0;
  pix_t col [3][64];   // col[row][x], row 0 = line N

  staging_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int x);
    window_t e;
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < 3; k++)
        e[3*r + k] = (x - k >= 0) ? col[r][x-k] : z[3*r + k];
    checks++;
    if (x >= 2 && z !== e) begin
      failures++;
      $display("col %0d: window %h expected %h", x, z, e);
    end
    checks++;
    if (oe !== (x >= 2)) begin
      failures++;
      $display("col %0d: oe %0b", x, oe);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int line = 0; line < 10; line++) begin
      int len;
      len = 3 + $urandom_range(20);
      for (int x = 0; x < len; x++) begin
        while ($urandom_range(2) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          sol = 1'b0;
        end
        @(negedge clk);
        in_valid = 1'b1;
        sol = (x == 0);
        n0 = 8'($urandom); n1 = 8'($urandom); n2 = 8'($urandom);
        col[0][x] = n0; col[1][x] = n1; col[2][x] = n2;
        @(negedge clk);
        in_valid = 1'b0;
        sol = 1'b0;
        if (oe) oe_count++;
        check(x);
      end
    end
    checks++;
    if (oe_count == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
