// tb_inline_fit: sweeps the fit check around each of its three thresholds at
// the default handler (21 instructions, 21 queue entries, 8 registers) and
// compares every answer with the three comparisons worked out here.
module tb_inline_fit;
  localparam int HLEN = 21, HIQ = 21, HREGS = 8;
  int checks = 0, failures = 0;
  logic [6:0] rob_free, iq_free;
  logic [7:0] preg_free, front_need;
  logic fits, short_rob, short_iq, short_reg;

  inline_fit dut (.*);

  initial begin : watchdog
    #100000;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int r = 0; r <= 80; r += 1)
      for (int q = 15; q <= 25; q++)
        for (int g = 0; g <= 12; g += 2)
          for (int f = 0; f <= 4; f += 4) begin
            logic exp_fit;
            rob_free = 7'(r); iq_free = 7'(q); preg_free = 8'(g); front_need = 8'(f);
            #1;
            exp_fit = (r >= HLEN) && (q >= HIQ) && (g >= HREGS + f);
            checks++;
            if (fits !== exp_fit || short_rob !== (r < HLEN) || short_iq !== (q < HIQ) ||
                short_reg !== (g < HREGS + f)) begin
              failures++;
              $display("ERROR: rob=%0d iq=%0d reg=%0d need=%0d -> fits=%b", r, q, g, f, fits);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
