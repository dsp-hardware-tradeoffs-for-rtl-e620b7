// basis_mem_tb: drives random writes into column M0, random column shifts
// and random per-row delay depths, and after every cycle reads back every
// register of the shift register file, comparing with a model that shifts
// column c of row r only when row_depth[r] >= c. This checks the shift
// order (M0 -> M1 -> ...), the gating of unused memory registers (they must
// hold their value), the single write port and the combinational read
// port, including zero for a read outside the array or with rd_en low,
// and the clear input.
module basis_mem_tb;
  import dpd_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned N = 13;
  localparam int unsigned D = 4;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   clear, shift, rd_en, wr_en;
  field_t row_depth [N];
  field_t rd_row, rd_col, wr_row;
  cfp_t   rd_data, wr_data;
  cfp_t   model [N][D+1];
  int checks = 0, failures = 0;
  int gated_holds = 0;

  basis_mem dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .shift(shift), .row_depth(row_depth),
    .rd_en(rd_en), .rd_row(rd_row), .rd_col(rd_col), .rd_data(rd_data),
    .wr_en(wr_en), .wr_row(wr_row), .wr_data(wr_data));

  always #500 clk = ~clk;

  task automatic read_all();
    for (int r = 0; r < int'(N); r++)
      for (int c = 0; c <= int'(D); c++) begin
        rd_en = 1'b1; rd_row = field_t'(r); rd_col = field_t'(c);
        #1;
        checks++;
        if (rd_data !== model[r][c]) begin
          failures++;
          if (failures < 10) $display("FAIL mem[%0d][%0d] = (%h,%h), expected (%h,%h)",
                                      r, c, rd_data.re, rd_data.im, model[r][c].re, model[r][c].im);
        end
      end
    rd_en = 1'b1; rd_row = field_t'(N); rd_col = '0;
    #1;
    checks++;
    if (rd_data !== '0) failures++;
    rd_en = 1'b0; rd_row = '0;
    #1;
    checks++;
    if (rd_data !== '0) failures++;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b0; shift = 1'b0; rd_en = 1'b0; wr_en = 1'b0; rd_row = '0; rd_col = '0; wr_row = '0; wr_data = '0;
    for (int r = 0; r < int'(N); r++) begin
      row_depth[r] = '0;
      for (int c = 0; c <= int'(D); c++) model[r][c] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    read_all();
    for (int cyc = 0; cyc < 300; cyc++) begin
      if (cyc % 40 == 0)
        for (int r = 0; r < int'(N); r++) row_depth[r] = field_t'($urandom_range(D));
      clear   = (cyc == 150);
      shift   = ($urandom_range(3) == 0);
      wr_en   = ($urandom_range(1) == 0);
      wr_row  = field_t'($urandom_range(N - 1));
      wr_data = rand_cfp(-4, 4);
      @(posedge clk);
      // model update
      if (shift)
        for (int r = 0; r < int'(N); r++)
          for (int c = int'(D); c >= 1; c--)
            if (int'(row_depth[r]) >= c) model[r][c] = model[r][c-1];
            else if (model[r][c] != model[r][c-1]) gated_holds++;
      if (wr_en) model[wr_row][0] = wr_data;
      if (clear)
        for (int r = 0; r < int'(N); r++)
          for (int c = 0; c <= int'(D); c++) model[r][c] = '0;
      @(negedge clk);
      clear = 1'b0; shift = 1'b0; wr_en = 1'b0;
      read_all();
    end
    checks++;
    if (gated_holds == 0) begin
      failures++;
      $display("FAIL no gated register was exercised");
    end
    $display("gated register holds observed: %0d", gated_holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
