// tb_narrow_fetch_path: the 32-bit, 8-cycle transfer engine against a behavioural
// 32-bit-wide sector memory kept in this testbench (registered read, like the mat array).
// Checks read atoms word by word, that atom_valid pulses exactly 10 cycles after the
// start, that reads can follow every 8 cycles, and that writes land word by word.
module tb_narrow_fetch_path;
  logic clk = 0, rst_n = 0;
  logic start_rd, start_wr;
  logic [1:0] col;
  logic [255:0] wr_atom, atom;
  logic arr_rd, arr_wr, atom_valid, busy;
  logic [4:0] arr_word;
  logic [31:0] arr_wdata, arr_rdata;
  logic [31:0] mem [32];
  int checks = 0, failures = 0;
  int cyc = 0;

  narrow_fetch_path #(.WORD_BITS(5)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_rd_i(start_rd), .start_wr_i(start_wr),
    .col_i(col), .wr_atom_i(wr_atom), .arr_rd_o(arr_rd), .arr_wr_o(arr_wr),
    .arr_word_o(arr_word), .arr_wdata_o(arr_wdata), .arr_rdata_i(arr_rdata),
    .atom_o(atom), .atom_valid_o(atom_valid), .busy_o(busy));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (arr_wr) mem[arr_word] <= arr_wdata;
    if (arr_rd) arr_rdata <= mem[arr_word];
  end

  function automatic logic [255:0] expect_atom(input int c);
    logic [255:0] a;
    for (int k = 0; k < 8; k++) a[k*32 +: 32] = mem[c*8 + k];
    return a;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // expected completions: start cycle + 10
  int exp_cycle [$];
  logic [1:0] exp_col [$];
  always @(negedge clk) if (rst_n && atom_valid) begin
    chk(exp_cycle.size() > 0, "unexpected atom_valid");
    if (exp_cycle.size() > 0) begin
      chk(cyc == exp_cycle[0], $sformatf("atom_valid timing, expected %0d", exp_cycle[0]));
      chk(atom === expect_atom(int'(exp_col[0])), "atom contents");
      void'(exp_cycle.pop_front());
      void'(exp_col.pop_front());
    end
  end

  task automatic start(input bit is_wr, input int c, input logic [255:0] a);
    @(negedge clk);
    start_rd = !is_wr; start_wr = is_wr; col = 2'(c); wr_atom = a;
    if (!is_wr) begin exp_cycle.push_back(cyc + 10); exp_col.push_back(2'(c)); end
    @(negedge clk);
    start_rd = 0; start_wr = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] a;
    start_rd = 0; start_wr = 0; col = 0; wr_atom = '0; arr_rdata = '0;
    for (int i = 0; i < 32; i++) mem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // single reads of each column
    for (int c = 0; c < 4; c++) begin
      start(0, c, '0);
      repeat (12) @(negedge clk);
    end
    // back-to-back reads every 8 cycles
    for (int c = 0; c < 4; c++) begin
      start(0, 3 - c, '0);
      repeat (6) @(negedge clk);
    end
    repeat (14) @(negedge clk);
    // writes: each word lands in the right place
    for (int c = 0; c < 4; c++) begin
      for (int k = 0; k < 8; k++) a[k*32 +: 32] = $urandom;
      start(1, c, a);
      repeat (10) @(negedge clk);
      for (int k = 0; k < 8; k++)
        chk(mem[c*8 + k] === a[k*32 +: 32], $sformatf("write col %0d word %0d", c, k));
    end
    // read back what was written
    start(0, 2, '0);
    repeat (12) @(negedge clk);
    chk(exp_cycle.size() == 0, "all reads completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
