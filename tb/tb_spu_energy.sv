// tb_spu_energy: random stereo and optical-flow operands against an integer
// evaluation of Eq. 1 written independently in the testbench.
// Eq. 1 is the document's; the flow label encoding follows its upper/lower
// bit split.  Combinational block, no clock; a watchdog after
// 1,000,000 time units ends the run with a failure.
module tb_spu_energy;
  import mca_pkg::*;
  localparam int LW = 8;
  app_e app;
  logic [2:0] alpha, beta;
  logic [LW-1:0] label;
  logic [7:0] img1, img2;
  logic [3:0][LW-1:0] nb_label;
  logic [3:0] nb_present;
  logic [E_W-1:0] energy;
  int checks = 0, failures = 0;

  spu_energy #(.LABEL_W(LW)) dut (.app, .alpha, .beta, .label, .img1, .img2, .nb_label, .nb_present, .energy);

  // watchdog
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e, s, d;
    for (int t = 0; t < 4000; t++) begin
      app = app_e'($urandom_range(1));
      alpha = 3'($urandom); beta = 3'($urandom);
      label = LW'($urandom); img1 = 8'($urandom); img2 = 8'($urandom);
      for (int k = 0; k < 4; k++) nb_label[k] = LW'($urandom);
      nb_present = 4'($urandom);
      if (t % 7 == 0) begin img2 = img1; nb_present = '0; end
      #1;
      d = longint'(img2) - longint'(img1);
      e = (d * d) * (longint'(1) << alpha);
      s = 0;
      for (int k = 0; k < 4; k++) if (nb_present[k]) begin
        if (app == APP_STEREO) s += (longint'(label) - longint'(nb_label[k])) ** 2;
        else s += (longint'(label[7:4]) - longint'(nb_label[k][7:4])) ** 2 +
                  (longint'(label[3:0]) - longint'(nb_label[k][3:0])) ** 2;
      end
      e += s * (longint'(1) << beta);
      checks++;
      if (longint'(energy) != e) begin
        failures++;
        if (failures < 10) $display("app %0d l %0d: got %0d exp %0d", app, label, energy, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
