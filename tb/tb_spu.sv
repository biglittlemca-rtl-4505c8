// tb_spu: drives the SPU with the same overlapped A/B schedule the SPE uses
// (slot of 16 cycles, A stream one cycle behind, B stream one slot behind A).
// With a near-greedy temperature (tinv = 255, energies even) only the lowest
// energy keeps a non-zero weight, so each drawn label must be the reference
// argmin over legal labels, computed in the testbench from the same operands.
// Also checks that each sample appears one cycle after its last label.
// The three SPU stages and Eq. 1 are the document's; the overlapped stream
// timing is this design's.  No ports; 10 ns clock; watchdog after 100,000 cycles.
module tb_spu;
  import mca_pkg::*;
  localparam int LW = 4, NL = 16, NPIX = 60;
  logic clk = 0, rst_n = 0;
  mca_cfg_t cfg;
  logic a_valid = 0, a_first = 0, a_bank = 0, a_legal = 0;
  logic [LW-1:0] a_label = '0;
  logic [7:0] a_img1 = '0, a_img2 = '0;
  logic [3:0][LW-1:0] a_nb_label = '0;
  logic [3:0] a_nb_present = '0;
  logic b_valid = 0, b_first = 0, b_last = 0, b_bank = 0;
  logic [LW-1:0] b_label = '0;
  logic [15:0] rnd = '0;
  logic sample_valid;
  logic [LW-1:0] sample_label;
  int checks = 0, failures = 0;

  spu #(.LABEL_W(LW)) dut (.*);
  always #5 clk = ~clk;

  logic [7:0] img1 [NPIX];
  logic [7:0] img2 [NPIX][NL];
  logic       legal [NPIX][NL];
  logic [3:0][LW-1:0] nbl [NPIX];
  logic [3:0] nbp [NPIX];

  function automatic longint energy(int p, int l);
    longint d = longint'(img2[p][l]) - longint'(img1[p]);
    longint s = 0;
    for (int k = 0; k < 4; k++) if (nbp[p][k]) s += (longint'(l) - longint'(nbl[p][k])) ** 2;
    return d * d * 2 + s * 2;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected sample of pixel p: set of labels with minimal energy
  function automatic logic is_min(int p, int l);
    longint m = -1;
    for (int k = 0; k < NL; k++) if (legal[p][k] && (m < 0 || energy(p, k) < m)) m = energy(p, k);
    return legal[p][l] && energy(p, l) == m;
  endfunction

  int nsamp = 0;
  int last_b_cycle = -10, cyc_count = 0;
  always @(posedge clk) begin
    cyc_count <= cyc_count + 1;
    if (b_valid && b_last) last_b_cycle <= cyc_count;
    if (sample_valid) begin
      checks++;
      if (cyc_count != last_b_cycle + 2) begin failures++; $display("sample latency %0d", cyc_count - last_b_cycle); end
      checks++;
      if (!is_min(nsamp, int'(sample_label))) begin
        failures++; $display("pixel %0d: drew %0d (E=%0d), not a minimum", nsamp, sample_label, energy(nsamp, sample_label));
      end
      nsamp++;
    end
  end

  initial begin
    cfg = '0; cfg.app = APP_STEREO; cfg.alpha = 3'd1; cfg.beta = 3'd1; cfg.tinv = 8'd255; cfg.num_labels = 9'd16;
    for (int p = 0; p < NPIX; p++) begin
      img1[p] = 8'($urandom);
      for (int l = 0; l < NL; l++) begin img2[p][l] = 8'($urandom); legal[p][l] = ($urandom_range(3) != 0); end
      legal[p][$urandom_range(NL - 1)] = 1'b1;
      for (int k = 0; k < 4; k++) nbl[p][k] = LW'($urandom);
      nbp[p] = 4'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // slot s: A stream carries pixel s-1 (label c-1, label 15 of pixel s-2 at c=0), B pixel s-2
    for (int s = 0; s < NPIX + 3; s++) begin
      for (int c = 0; c < NL; c++) begin
        int pa, la, pb;
        @(negedge clk);
        pa = (c == 0) ? s - 2 : s - 1;
        la = (c == 0) ? NL - 1 : c - 1;
        a_valid = (pa >= 0 && pa < NPIX);
        if (a_valid) begin
          a_first = (la == 0); a_bank = pa[0]; a_label = LW'(la); a_legal = legal[pa][la];
          a_img1 = img1[pa]; a_img2 = img2[pa][la]; a_nb_label = nbl[pa]; a_nb_present = nbp[pa];
        end
        pb = s - 2;
        b_valid = (pb >= 0 && pb < NPIX);
        b_first = (c == 0); b_last = (c == NL - 1); b_bank = pb[0]; b_label = LW'(c);
        rnd = 16'($urandom);
      end
    end
    @(negedge clk); a_valid = 0; b_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (nsamp != NPIX) begin failures++; $display("%0d samples, expected %0d", nsamp, NPIX); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
