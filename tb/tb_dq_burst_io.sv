// tb_dq_burst_io: burst serializer / deserializer. A loaded atom must appear as {D1,D0}
// in the next cycle and {D3,D2} in the one after, with zeros and no valid otherwise;
// write beats captured with cap_lo/cap_hi must reassemble the atom.
module tb_dq_burst_io;
  logic clk = 0, rst_n = 0;
  logic load, cap_lo, cap_hi, dq_valid;
  logic [255:0] atom, wr_atom;
  logic [127:0] dq_out, dq_in;
  int checks = 0, failures = 0;

  dq_burst_io dut (
    .clk_i(clk), .rst_ni(rst_n), .load_i(load), .atom_i(atom), .dq_o(dq_out),
    .dq_valid_o(dq_valid), .cap_lo_i(cap_lo), .cap_hi_i(cap_hi), .dq_i(dq_in),
    .wr_atom_o(wr_atom));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] a;
    load = 0; cap_lo = 0; cap_hi = 0; atom = '0; dq_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      for (int k = 0; k < 8; k++) a[k*32 +: 32] = $urandom;
      @(negedge clk); load = 1; atom = a;
      @(negedge clk); load = 0; atom = '0;
      chk(dq_valid && dq_out[63:0] === a[63:0] && dq_out[127:64] === a[127:64], "beats D0 D1");
      @(negedge clk);
      chk(dq_valid && dq_out[63:0] === a[191:128] && dq_out[127:64] === a[255:192], "beats D2 D3");
      if (i % 2 == 0) begin
        @(negedge clk);
        chk(!dq_valid && dq_out === '0, "idle after burst");
      end
      // write direction
      for (int k = 0; k < 8; k++) a[k*32 +: 32] = $urandom;
      cap_lo = 1; dq_in = a[127:0];
      @(negedge clk); cap_lo = 0; cap_hi = 1; dq_in = a[255:128];
      @(negedge clk); cap_hi = 0; dq_in = '0;
      chk(wr_atom === a, "write atom assembled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
