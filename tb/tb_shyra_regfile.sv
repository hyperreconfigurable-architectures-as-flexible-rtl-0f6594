// tb_shyra_regfile: random test of the 73 one-bit registers against a model:
// reset to 0, LUT writes only in compute cycles, external writes otherwise,
// LUT write winning over an external write to the same register.
module tb_shyra_regfile;
  localparam int NR = 73;
  logic clk = 0, rst_n = 0, exec = 0;
  logic [NR-1:0] lut_we = '0, lut_d = '0, ext_we = '0, ext_d = '0, q;
  bit   [NR-1:0] model;
  int checks = 0, failures = 0, both = 0;

  shyra_regfile #(.N_REG(NR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NR-1:0] rnd();
    logic [NR-1:0] v;
    for (int i = 0; i < NR; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    model = '0;
    for (int t = 0; t < 500; t++) begin
      exec   = 1'($urandom);
      lut_we = rnd() & rnd();
      lut_d  = rnd();
      ext_we = rnd() & rnd();
      ext_d  = rnd();
      for (int r = 0; r < NR; r++) begin
        if (exec && lut_we[r]) model[r] = lut_d[r];
        else if (ext_we[r])    model[r] = ext_d[r];
        if (exec && lut_we[r] && ext_we[r]) both++;
      end
      @(negedge clk);
      checks++;
      if (q !== model) begin failures++; $display("FAIL t=%0d", t); end
    end
    checks++;
    if (both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
