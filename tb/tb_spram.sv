// tb_spram: random writes and reads against a reference array; checks the
// one-cycle read latency and that rdata holds while the port is idle.
// Single-ported banks are the document's; the registered read is this
// design's.  No ports; 10 ns clock; watchdog after 20,000 cycles.
module tb_spram;
  localparam int DEPTH = 100, WIDTH = 12;
  logic clk = 0, en = 0, we = 0;
  logic [6:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  logic [DEPTH-1:0] written = '0;
  int checks = 0, failures = 0;

  spram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] held;
    int a;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 7'(i); wdata = WIDTH'($urandom);
      ref_mem[i] = wdata; written[i] = 1'b1;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a = $urandom_range(DEPTH - 1);
      en = 1; addr = 7'(a); we = ($urandom_range(2) == 0);
      if (we) begin
        wdata = WIDTH'($urandom); ref_mem[a] = wdata;
      end else begin
        held = ref_mem[a];
        @(negedge clk); en = 0;
        checks++;
        if (rdata !== held) begin failures++; $display("read %0d: got %h exp %h", a, rdata, held); end
        @(negedge clk);
        checks++;
        if (rdata !== held) begin failures++; $display("rdata not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
