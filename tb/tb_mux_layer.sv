// tb_mux_layer: exhaustive check of the default multiplexer layer (the
// example's wiring) over all LUT values and select words. Reference: chain 1
// uses S1 S0 and sees LUT0, LUT1, LUT2 on inputs 0..2; chain 2 uses S2 and
// sees LUT2, LUT3; chain 3 uses S4 S3 and sees LUT3, LUT0, LUT1. An input
// number with no LUT wired to it reads 0.
module tb_mux_layer;
  logic [3:0] lut;
  logic [4:0] sel;
  logic [2:0] y;
  int checks = 0, failures = 0;

  mux_layer dut (.lut_in(lut), .sel, .chain_bits(y));

  function automatic logic ref_bit(logic [3:0] l, int s, int lut0, int lut1, int lut2, int n);
    if (s >= n) return 1'b0;
    case (s)
      0: return l[lut0];
      1: return l[lut1];
      default: return l[lut2];
    endcase
  endfunction

  initial begin
    for (int l = 0; l < 16; l++)
      for (int s = 0; s < 32; s++) begin
        logic [2:0] e;
        lut = 4'(l); sel = 5'(s);
        #1;
        e[0] = ref_bit(lut, s & 3, 0, 1, 2, 3);
        e[1] = ref_bit(lut, (s >> 2) & 1, 2, 3, 0, 2);
        e[2] = ref_bit(lut, (s >> 3) & 3, 3, 0, 1, 3);
        checks++;
        if (y != e) begin
          failures++;
          $display("FAIL lut=%b sel=%b: %b, expected %b", lut, sel, y, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
