// tb_shyra_demux: random test of the LUT-output-to-register crosspoint network
// at its full size (18 LUT outputs, 73 registers). Each register is written
// when at least one switch to it is closed, with the OR of those LUT outputs;
// fan-out of one LUT to several registers is included.
module tb_shyra_demux;
  localparam int NS = 18, ND = 73;
  logic [NS-1:0]         src;
  logic [NS-1:0][ND-1:0] sel;
  logic [ND-1:0]         we, d;
  int checks = 0, failures = 0;

  shyra_demux #(.N_SRC(NS), .N_DST(ND)) dut (.src, .sel, .we, .d);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int s = 0; s < NS; s++) begin
        src[s] = 1'($urandom);
        sel[s] = '0;
        for (int k = 0; k < int'($urandom % 4); k++) sel[s][$urandom % ND] = 1'b1;
      end
      #1;
      for (int r = 0; r < ND; r++) begin
        automatic bit ew = 0, ed = 0;
        for (int s = 0; s < NS; s++) if (sel[s][r]) begin
          ew = 1;
          ed |= src[s];
        end
        checks++;
        if (we[r] !== ew || (ew && d[r] !== ed)) begin
          failures++;
          $display("FAIL t=%0d reg %0d: we=%b d=%b expected %b %b", t, r, we[r], d[r], ew, ed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
