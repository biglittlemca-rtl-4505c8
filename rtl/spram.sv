// spram: single-ported synchronous RAM, the model of one SRAM macro.
//
// The SPEs keep their image tiles and label states in single-ported banks;
// the document relies on lockstep operation so that one port per bank is
// enough.  One access per cycle: when en is high a write (we=1) stores
// wdata at addr, a read (we=0) returns mem[addr] on rdata one cycle later.
// rdata holds its value while en is low.  The array is left uninitialised,
// as an SRAM is; reset clears only the output register.
module spram #(
  parameter int unsigned DEPTH = 1920,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

  // An access outside the array is a scheduling error upstream.
  always_ff @(posedge clk) if (en) assert (32'(addr) < DEPTH) else $error("spram: address %0d out of range", addr);
endmodule
