// tb_shyra_cfg_mem: test of the hyperreconfigurable configuration memory with
// 61 switches. Random hypercontexts (including empty and full ones) are loaded;
// mask and |h| are checked after each. Contexts of exactly |h| bits are then
// shifted in; the model places them on the available switches in ascending
// order, leaves all other switches untouched, and the effective configuration
// must equal model & mask. A smaller hypercontext afterwards must hide the
// switches it drops.
module tb_shyra_cfg_mem;
  localparam int N = 61;
  localparam int CW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;
  logic bit_in = 0, mask_shift = 0, mask_commit = 0, ctx_shift = 0;
  logic [N-1:0] mask, cfg;
  logic [CW-1:0] h_size;
  bit [N-1:0] m_mask, m_ctx;
  int checks = 0, failures = 0;

  shyra_cfg_mem #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_mask(bit [N-1:0] m);
    for (int i = 0; i < N; i++) begin
      bit_in = m[i]; mask_shift = 1; mask_commit = (i == N - 1);
      @(negedge clk);
      // the active mask changes only with the last bit
      if (i < N - 1) check(mask == m_mask, "mask stable while loading");
    end
    mask_shift = 0; mask_commit = 0;
    m_mask = m;
    check(mask == m, "mask loaded");
    check(int'(h_size) == $countones(m), "h_size");
  endtask

  task automatic load_ctx(bit [N-1:0] v);
    // the stream is v's bits on the available switches, lowest switch first
    for (int i = 0; i < N; i++) if (m_mask[i]) begin
      bit_in = v[i]; ctx_shift = 1;
      @(negedge clk);
      ctx_shift = 0;
      if ($urandom % 3 == 0) @(negedge clk);   // idle cycle between bits
    end
    for (int i = 0; i < N; i++) if (m_mask[i]) m_ctx[i] = v[i];
    check(cfg == (m_ctx & m_mask), "context on available switches");
  endtask

  function automatic bit [N-1:0] rnd(int density);
    bit [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = (($urandom % 100) < density);
    return v;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    m_mask = '0; m_ctx = '0;
    check(cfg == '0 && mask == '0 && h_size == '0, "reset");
    for (int t = 0; t < 30; t++) begin
      automatic int dens = (t == 0) ? 100 : (t == 1) ? 0 : int'($urandom % 100);
      load_mask(rnd(dens));
      for (int k = 0; k < 3; k++) load_ctx(rnd(50));
    end
    // shrink: drop half the switches of a full hypercontext
    load_mask('1);
    load_ctx('1);
    load_mask(rnd(50));
    check(cfg == m_mask, "dropped switches are open, kept ones keep their value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
