// tb_scaleup_net: Little grid 2 x 1 of 2 x 4 tiles, Big grid 4 x 2 of 2 x 4
// tiles, factors 2 and 4.  Each Little SPE issues writes to random Big SPEs of
// its own group (the Big SPEs whose source it is for the selected factor);
// exactly the addressed Big SPE must see rx_en, with the right address and label.
// One fixed network per scale factor, chosen at run time, is the document's;
// the source mapping checked is the one implied by its nearest-neighbour
// scaling.  No ports; 10 ns clock; the run is a fixed number of random
// writes; a watchdog ends it with a failure after 1,000,000 time units.
module tb_scaleup_net;
  import mca_pkg::*;
  localparam int QLR = 2, QLC = 1, NLR = 2, NLC = 4, QBR = 4, QBC = 2, NBR = 2, NBC = 4, LWB = 6;
  su_wr_t [QLR-1:0][QLC-1:0] little_wr;
  logic scale_sel;
  logic [QBR-1:0][QBC-1:0] rx_en;
  logic [QBR-1:0][QBC-1:0][2:0] rx_addr;
  logic [QBR-1:0][QBC-1:0][LWB-1:0] rx_label;
  int checks = 0, failures = 0;

  scaleup_net #(.QL_ROWS(QLR), .QL_COLS(QLC), .NL_ROWS(NLR), .NL_COLS(NLC), .QB_ROWS(QBR), .QB_COLS(QBC),
                .NB_ROWS(NBR), .NB_COLS(NBC), .SCALE0(2), .SCALE1(4), .LW_BIG(LWB)) dut (.*);

  // watchdog
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, src_a, src_b, tq, tr;
    int tq_of [QLR][QLC];
    int tr_of [QLR][QLC];
    for (int t = 0; t < 400; t++) begin
      scale_sel = 1'($urandom);
      s = scale_sel ? 4 : 2;
      little_wr = '0;
      foreach (tq_of[a, b]) tq_of[a][b] = -1;
      for (int a = 0; a < QLR; a++) for (int b = 0; b < QLC; b++) begin
        // pick a Big SPE of this Little SPE's group, if it has one
        int cand_q[$];
        int cand_r[$];
        cand_q.delete();
        cand_r.delete();
        for (int q = 0; q < QBR; q++) for (int r = 0; r < QBC; r++)
          if (q * NBR / (s * NLR) == a && r * NBC / (s * NLC) == b) begin cand_q.push_back(q); cand_r.push_back(r); end
        if (cand_q.size() > 0 && $urandom_range(3) != 0) begin
          int k;
          k = $urandom_range(cand_q.size() - 1);
          little_wr[a][b].valid = 1'b1;
          little_wr[a][b].dq = 8'(cand_q[k]);
          little_wr[a][b].dr = 8'(cand_r[k]);
          little_wr[a][b].row = 8'($urandom_range(NBR - 1));
          little_wr[a][b].col = 10'($urandom_range(NBC - 1));
          little_wr[a][b].label = 8'($urandom_range(63));
          tq_of[a][b] = cand_q[k];
          tr_of[a][b] = cand_r[k];
        end
      end
      #1;
      for (int q = 0; q < QBR; q++) for (int r = 0; r < QBC; r++) begin
        logic exp_en;
        int ea = -1, eb = -1;
        exp_en = 1'b0;
        foreach (tq_of[a, b]) if (tq_of[a][b] == q && tr_of[a][b] == r) begin exp_en = 1'b1; ea = a; eb = b; end
        checks++;
        if (rx_en[q][r] !== exp_en) begin failures++; $display("rx_en[%0d][%0d]=%0d exp %0d (S=%0d)", q, r, rx_en[q][r], exp_en, s); end
        if (exp_en) begin
          checks++;
          if (int'(rx_addr[q][r]) != int'(little_wr[ea][eb].row) * NBC + int'(little_wr[ea][eb].col) ||
              int'(rx_label[q][r]) != int'(little_wr[ea][eb].label)) begin
            failures++; $display("rx data mismatch at [%0d][%0d]", q, r);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
