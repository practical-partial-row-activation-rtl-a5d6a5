// tb_sector_decoder: exhaustive check of the column-to-sector decode for the 8-sector
// configuration and for the 4-sector alternative. Expected values come from arithmetic
// on the column number (sector = col / columns-per-sector).
module tb_sector_decoder;
  logic [4:0] col;
  logic [2:0] s8;  logic [7:0] oh8;  logic [1:0] c8;
  logic [1:0] s4;  logic [3:0] oh4;  logic [2:0] c4;
  int checks = 0, failures = 0;

  sector_decoder #(.NUM_SECTORS(8), .COL_BITS(5)) dut8 (
    .col_i(col), .sector_o(s8), .sector_oh_o(oh8), .col_in_sector_o(c8));
  sector_decoder #(.NUM_SECTORS(4), .COL_BITS(5)) dut4 (
    .col_i(col), .sector_o(s4), .sector_oh_o(oh4), .col_in_sector_o(c4));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s col=%0d", what, col); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++) begin
      col = 5'(c);
      #1;
      chk(int'(s8) == c / 4, "sector8");
      chk(oh8 == 8'(1 << (c / 4)), "onehot8");
      chk(int'(c8) == c % 4, "col8");
      chk(int'(s4) == c / 8, "sector4");
      chk(oh4 == 4'(1 << (c / 8)), "onehot4");
      chk(int'(c4) == c % 8, "col4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
