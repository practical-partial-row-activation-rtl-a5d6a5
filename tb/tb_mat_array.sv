// tb_mat_array: checks the half-mat storage of a bank.
//  1. with every local wordline up, random writes to every row/sector/word are read back
//     (reference: a plain array indexed by row, sector and word);
//  2. a read from a sector whose wordline is down returns zeros, and a write to it is lost;
//  3. sector 0 is split between the two edge decoders: decoder 0 alone gives the low 16
//     bits, decoder 8 alone the high 16 bits;
//  4. the read data appears exactly one cycle after the read.
module tb_mat_array;
  localparam int ROWS = 4, NS = 8, WORDS = 32;
  logic clk = 0;
  logic [NS:0] lwl;
  logic [1:0]  row;
  logic [2:0]  sec;
  logic [4:0]  word;
  logic        rd, wr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [ROWS][NS][WORDS];
  int checks = 0, failures = 0;

  mat_array #(.ROWS(ROWS), .NUM_SECTORS(NS)) dut (
    .clk_i(clk), .lwl_i(lwl), .row_i(row), .sector_i(sec), .word_i(word),
    .rd_i(rd), .wr_i(wr), .wdata_i(wdata), .rdata_o(rdata));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_wr(input int r, input int s, input int w, input logic [31:0] d);
    @(negedge clk);
    row = 2'(r); sec = 3'(s); word = 5'(w); wdata = d; wr = 1; rd = 0;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic do_rd(input int r, input int s, input int w, output logic [31:0] d);
    @(negedge clk);
    row = 2'(r); sec = 3'(s); word = 5'(w); rd = 1; wr = 0;
    @(posedge clk);
    #1 d = rdata;
    @(negedge clk);
    rd = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    rd = 0; wr = 0; lwl = '1; row = 0; sec = 0; word = 0; wdata = 0;
    // 1. fill and read back
    for (int r = 0; r < ROWS; r++)
      for (int s = 0; s < NS; s++)
        for (int w = 0; w < WORDS; w++) begin
          ref_mem[r][s][w] = $urandom;
          do_wr(r, s, w, ref_mem[r][s][w]);
        end
    for (int r = 0; r < ROWS; r++)
      for (int s = 0; s < NS; s++)
        for (int w = 0; w < WORDS; w += 3) begin
          do_rd(r, s, w, d);
          chk(d === ref_mem[r][s][w], $sformatf("readback r%0d s%0d w%0d", r, s, w));
        end
    // 2. gated sector reads zero and ignores writes
    for (int s = 1; s < NS; s++) begin
      lwl = '1; lwl[s] = 1'b0;
      do_rd(1, s, 5, d);
      chk(d === 32'h0, $sformatf("gated read s%0d", s));
      do_wr(1, s, 5, 32'hDEADBEEF);
      lwl = '1;
      do_rd(1, s, 5, d);
      chk(d === ref_mem[1][s][5], $sformatf("gated write lost s%0d", s));
      // neighbouring sector unaffected when this one is gated
      lwl = '0; lwl[s] = 1'b1;
      do_rd(2, s, 7, d);
      chk(d === ref_mem[2][s][7], $sformatf("single sector read s%0d", s));
      do_rd(2, (s % (NS - 1)) + 1 == s ? 1 : (s % (NS - 1)) + 1, 7, d);
      chk(d === 32'h0, $sformatf("other sector dark s%0d", s));
    end
    // 3. sector 0 split over the edge decoders
    lwl = '0; lwl[0] = 1'b1;
    do_rd(3, 0, 9, d);
    chk(d === {16'h0, ref_mem[3][0][9][15:0]}, "edge decoder 0 -> low half");
    lwl = '0; lwl[NS] = 1'b1;
    do_rd(3, 0, 9, d);
    chk(d === {ref_mem[3][0][9][31:16], 16'h0}, "edge decoder 8 -> high half");
    // 4. read latency: data not there before the clock edge that follows the read
    lwl = '1;
    @(negedge clk);
    row = 0; sec = 2; word = 1; rd = 1;
    do_rd(0, 3, 4, d);   // primes rdata with another word
    @(negedge clk);
    row = 0; sec = 2; word = 1; rd = 1;
    #1 chk(rdata === ref_mem[0][3][4], "old data held before edge");
    @(posedge clk); #1;
    chk(rdata === ref_mem[0][2][1], "new data after one edge");
    rd = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
