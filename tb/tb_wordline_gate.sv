// tb_wordline_gate: exhaustive check of the 9 local wordline AND gates of a subarray.
// Decoder d serves sector d, except the two edge decoders 0 and 8, which both serve
// sector 0; no decoder may rise while the global wordline is low.
module tb_wordline_gate;
  logic       gwl;
  logic [7:0] valid;
  logic [8:0] lwl;
  int checks = 0, failures = 0;

  wordline_gate #(.NUM_SECTORS(8)) dut (.gwl_i(gwl), .valid_i(valid), .lwl_o(lwl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 2; g++)
      for (int v = 0; v < 256; v++) begin
        logic [8:0] exp;
        gwl = 1'(g); valid = 8'(v);
        #1;
        exp = g ? {valid[0], valid} : 9'd0;
        checks++;
        if (lwl !== exp) begin
          failures++;
          $display("FAIL gwl=%0d valid=%b lwl=%b exp=%b", g, valid, lwl, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
