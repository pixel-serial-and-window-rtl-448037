// tb_reference_buffer: self-checking test of the reference buffer BL with W_MAX = 5.
// The 5 x 5 window is written column by column, random reads must return the pixel one
// cycle later, and replacing one column slot must leave the others intact.
module tb_reference_buffer;
  import stereo_pkg::*;
  localparam int W_MAX = 5;

  logic clk = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [2:0] wr_col, wr_row, rd_col, rd_row;
  pix_t wr_data, rd_data;
  int checks = 0, failures = 0;
  int model [W_MAX][W_MAX];

  reference_buffer #(.W_MAX(W_MAX)) dut (
    .clk, .wr_en, .wr_col, .wr_row, .wr_data, .rd_en, .rd_col, .rd_row, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_col(int c);
    for (int r = 0; r < W_MAX; r++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_col = 3'(c); wr_row = 3'(r);
      model[c][r] = $urandom_range(0, 255);
      wr_data = pix_t'(model[c][r]);
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic read_check(int n);
    for (int t = 0; t < n; t++) begin
      automatic int c = $urandom_range(0, W_MAX - 1);
      automatic int r = $urandom_range(0, W_MAX - 1);
      @(negedge clk);
      rd_en = 1'b1; rd_col = 3'(c); rd_row = 3'(r);
      @(negedge clk);
      rd_en = 1'b0;
      checks++;
      if (int'(rd_data) != model[c][r]) begin
        failures++;
        if (failures < 10) $display("FAIL col=%0d row=%0d got %0d want %0d", c, r, rd_data, model[c][r]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    for (int c = 0; c < W_MAX; c++) write_col(c);
    read_check(200);
    write_col(3);
    read_check(200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
