// tb_valid_bit_latch: random set / clear traffic against a reference bit vector.
// Checks that a set marks exactly its sector, that bits accumulate while the row is
// open, that clear empties the vector and wins over a set in the same cycle.
module tb_valid_bit_latch;
  logic clk = 0, rst_n = 0;
  logic clear, set;
  logic [2:0] sec;
  logic [7:0] valid, model;
  int checks = 0, failures = 0;

  valid_bit_latch #(.NUM_SECTORS(8)) dut (
    .clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .set_i(set), .set_sector_i(sec),
    .valid_o(valid));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; set = 0; sec = 0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (valid !== model) begin
        failures++;
        $display("FAIL cycle %0d valid=%b model=%b", i, valid, model);
      end
      clear = ($urandom_range(0, 15) == 0);
      set   = ($urandom_range(0, 2) != 0);
      sec   = 3'($urandom);
      if (clear)    model = '0;
      else if (set) model[sec] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
