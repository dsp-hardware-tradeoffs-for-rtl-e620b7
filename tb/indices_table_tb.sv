// indices_table_tb: loads the six-entry example dictionary (type 0; two
// type II; phi_2 and phi_3 delayed by 1 and 2; one type II using the delayed
// term) and then random dictionaries, reads every entry back and checks the
// derived per-row delay depth: the largest delay m of any type I entry that
// reads the row, clipped to the memory depth, zero for rows never delayed.
module indices_table_tb;
  import dpd_pkg::*;

  localparam int unsigned N = 13;
  localparam int unsigned D = 4;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   we;
  field_t waddr, raddr;
  entry_t wdata, rdata;
  field_t row_depth [N];
  entry_t model [N];
  int checks = 0, failures = 0;

  indices_table dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(rdata), .row_depth(row_depth));

  always #5 clk = ~clk;

  task automatic write_entry(int idx, entry_t e);
    @(negedge clk);
    we = 1'b1; waddr = field_t'(idx); wdata = e;
    @(negedge clk);
    we = 1'b0;
    if (idx < int'(N)) model[idx] = e;
  endtask

  task automatic check_all();
    for (int r = 0; r < int'(N); r++) begin
      int exp_d;
      raddr = field_t'(r);
      #1;
      checks++;
      if (rdata !== model[r]) begin
        failures++;
        if (failures < 10) $display("FAIL entry %0d = %h, expected %h", r, rdata, model[r]);
      end
      exp_d = 0;
      for (int e = 0; e < int'(N); e++)
        if (model[e].op == OP_TYPE1 && int'(model[e].f1) == r + 1 && int'(model[e].f2) > exp_d)
          exp_d = int'(model[e].f2);
      if (exp_d > int'(D)) exp_d = int'(D);
      checks++;
      if (int'(row_depth[r]) != exp_d) begin
        failures++;
        if (failures < 10) $display("FAIL row_depth[%0d] = %0d, expected %0d", r, row_depth[r], exp_d);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int r = 0; r < int'(N); r++) model[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check_all();
    // example dictionary: fields (i, j|m, k|0), type
    write_entry(0, '{f1: 0, f2: 0, f3: 0, op: OP_TYPE0});
    write_entry(1, '{f1: 1, f2: 1, f3: 1, op: OP_TYPE2});
    write_entry(2, '{f1: 1, f2: 2, f3: 2, op: OP_TYPE2});
    write_entry(3, '{f1: 2, f2: 1, f3: 0, op: OP_TYPE1});
    write_entry(4, '{f1: 3, f2: 2, f3: 0, op: OP_TYPE1});
    write_entry(5, '{f1: 1, f2: 2, f3: 4, op: OP_TYPE2});
    write_entry(int'(N), '{f1: 9, f2: 9, f3: 9, op: OP_TYPE1});   // out of range: ignored
    check_all();
    checks++;
    if (row_depth[1] != 1 || row_depth[2] != 2 || row_depth[0] != 0) failures++;
    for (int t = 0; t < 40; t++) begin
      for (int r = 0; r < int'(N); r++) begin
        entry_t e;
        e.op = op_type_e'($urandom_range(2));
        e.f1 = field_t'(1 + $urandom_range(N - 1));
        e.f2 = field_t'($urandom_range(D + 2));
        e.f3 = field_t'($urandom_range(N));
        write_entry(r, e);
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
