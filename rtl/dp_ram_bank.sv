// dp_ram_bank: one of the eight dual-port data memory banks.
//
// Each bank holds DEPTH complex words. It has one write port (written on the
// rising clock edge when we is high) and one read port whose data follows
// raddr in the same cycle (a small register-file style memory). The FFT
// processor reads an octet through the read ports of all eight banks while
// it writes an earlier octet through the write ports; the address mapping
// guarantees that the two never touch the same word, which the assertion
// below checks. Eight banks of eight words, each addressed with 3 bits,
// follow the published design; the same-cycle read port is this design's
// choice.
module dp_ram_bank #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,      // read strobe, used only by the assertion
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

  // No word is read and written in the same cycle.
  a_no_rw_collision: assert property (@(posedge clk) !(we && re && waddr == raddr))
    else $error("dp_ram_bank: word %0d read and written in the same cycle", waddr);

endmodule
