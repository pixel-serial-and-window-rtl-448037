// tb_candidate_buffer: self-checking test of the candidate buffer with 4 memory modules
// of 4 columns and 6 row slots (16 columns, W_MAX = 5). All pixels are written through
// the column-addressed write port, then random reads must return, one cycle later, in
// module p the pixel of column p*4+k of the addressed row slot, or 0 when rd_zero is set.
// A row is then overwritten and read back to check that rows are independent.
module tb_candidate_buffer;
  import stereo_pkg::*;
  localparam int M = 16, N_PE = 4, W_MAX = 5, ROWS = W_MAX + 1, SLOTS = M / N_PE;

  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, rd_zero = 1'b0;
  logic [3:0] wr_x;
  logic [2:0] wr_row, rd_row;
  logic [1:0] rd_k;
  pix_t wr_data;
  pix_t cand [N_PE];
  int checks = 0, failures = 0;
  int model [ROWS][M];

  candidate_buffer #(.M(M), .N_PE(N_PE), .W_MAX(W_MAX)) dut (
    .clk, .wr_en, .wr_x, .wr_row, .wr_data, .rd_en, .rd_zero, .rd_k, .rd_row,
    .cand_o(cand));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_row(int row);
    for (int x = 0; x < M; x++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_x = 4'(x); wr_row = 3'(row);
      model[row][x] = $urandom_range(0, 255);
      wr_data = pix_t'(model[row][x]);
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic read_check(int n);
    for (int t = 0; t < n; t++) begin
      automatic int kk = $urandom_range(0, SLOTS - 1);
      automatic int rr = $urandom_range(0, ROWS - 1);
      automatic bit z = ($urandom_range(0, 4) == 0);
      @(negedge clk);
      rd_en = 1'b1; rd_k = 2'(kk); rd_row = 3'(rr); rd_zero = z;
      @(negedge clk);
      rd_en = 1'b0;
      for (int p = 0; p < N_PE; p++) begin
        checks++;
        if (int'(cand[p]) != (z ? 0 : model[rr][p * SLOTS + kk])) begin
          failures++;
          if (failures < 10) $display("FAIL p=%0d k=%0d row=%0d got %0d", p, kk, rr, cand[p]);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    for (int row = 0; row < ROWS; row++) write_row(row);
    read_check(300);
    write_row(2);
    read_check(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
