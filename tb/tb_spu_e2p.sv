// tb_spu_e2p: checks the power-of-two weight against a reference: the minimum
// weighs 2**15, every 16/tinv of energy halves it, illegal labels weigh 0.
// The stage is named by the document; the power-of-two approximation checked
// here is this design's.  Combinational block, no clock; a watchdog after 1,000,000
// time units ends the run with a failure.
module tb_spu_e2p;
  import mca_pkg::*;
  logic [E_W-1:0] energy, emin;
  logic legal;
  logic [7:0] tinv;
  logic [W_W-1:0] weight;
  int checks = 0, failures = 0;

  spu_e2p dut (.energy, .emin, .legal, .tinv, .weight);

  // watchdog
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x, w;
    for (int t = 0; t < 5000; t++) begin
      emin = E_W'($urandom_range(100000));
      energy = emin + E_W'($urandom_range((t % 3 == 0) ? 4 : 300));
      legal = ($urandom_range(9) != 0);
      tinv = 8'($urandom_range(1, 40));
      #1;
      x = ((longint'(energy) - longint'(emin)) * longint'(tinv)) / 16;
      w = (!legal || x >= 16) ? 0 : (32768 / (longint'(1) << x));
      checks++;
      if (longint'(weight) != w) begin
        failures++;
        if (failures < 10) $display("E-Emin %0d tinv %0d: got %0d exp %0d", energy - emin, tinv, weight, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
