// tb_shyra_lut: exhaustive test of the three-input LUT. For every input pattern
// and a set of truth tables (the Boolean operations used by the control tasks
// plus random ones) the output is compared with the truth-table bit computed
// here from the input pattern.
module tb_shyra_lut;
  logic [7:0] tt;
  logic [2:0] x;
  logic       y;
  int checks = 0, failures = 0;

  shyra_lut dut (.tt, .x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: operation of the three inputs a = x[0], b = x[1], c = x[2]
  function automatic bit ref_op(int op, bit a, bit b, bit c, bit [7:0] rnd);
    case (op)
      0: return a & b;
      1: return a ^ b;
      2: return !(a ^ b);
      3: return b ? a : c;
      4: return (a & b) | (a & c) | (b & c);
      5: return !a;
      default: return rnd[{c, b, a}];
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 40; t++) begin
      automatic int op = (t < 6) ? t : 6;
      automatic bit [7:0] rnd = 8'($urandom);
      for (int k = 0; k < 8; k++) tt[k] = ref_op(op, k[0], k[1], k[2], rnd);
      for (int k = 0; k < 8; k++) begin
        x = 3'(k);
        #1;
        checks++;
        if (y !== ref_op(op, x[0], x[1], x[2], rnd)) begin
          failures++;
          $display("FAIL op=%0d tt=%b x=%b y=%b", op, tt, x, y);
        end
      end
    end
    // spot check a fixed table: AND of the first two inputs, 8'b1000_1000
    tt = 8'b1000_1000;
    x = 3'b011; #1; checks++; if (y !== 1'b1) failures++;
    x = 3'b111; #1; checks++; if (y !== 1'b1) failures++;
    x = 3'b101; #1; checks++; if (y !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
