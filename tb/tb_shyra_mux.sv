// tb_shyra_mux: random test of the register-to-LUT-input crosspoint network at
// its full size (73 registers, 54 LUT inputs). Each case closes zero, one or
// several switches per input; the expected input value is the OR of the
// selected registers, computed here one crosspoint at a time.
module tb_shyra_mux;
  localparam int NS = 73, ND = 54;
  logic [NS-1:0]         src;
  logic [ND-1:0][NS-1:0] sel;
  logic [ND-1:0]         dst;
  int checks = 0, failures = 0;

  shyra_mux #(.N_SRC(NS), .N_DST(ND)) dut (.src, .sel, .dst);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NS; i++) src[i] = 1'($urandom);
      for (int d = 0; d < ND; d++) begin
        sel[d] = '0;
        case ($urandom % 4)
          0: ;                                          // input left open
          1, 2: sel[d][$urandom % NS] = 1'b1;           // plain multiplexer
          default: for (int k = 0; k < 3; k++) sel[d][$urandom % NS] = 1'b1;
        endcase
      end
      #1;
      for (int d = 0; d < ND; d++) begin
        automatic bit e = 0;
        for (int i = 0; i < NS; i++) if (sel[d][i] && src[i]) e = 1;
        checks++;
        if (dst[d] !== e) begin
          failures++;
          $display("FAIL t=%0d input %0d: %b expected %b", t, d, dst[d], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
