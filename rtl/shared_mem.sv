// shared_mem: the global data memory shared by the processors on the bus.
//
// A single-port synchronous RAM of 2**ADDR_W bytes, as a block RAM provides:
// on each rising edge it writes data_in at address when write_en is high and
// registers the word at address onto data_out (read-first: a write returns
// the old contents). data_out is one cycle behind the address, which suits a
// PicoBlaze INPUT because the processor drives port_id a full cycle before
// it samples in_port.
//
// The four ports write_en, data_in, address and data_out are the ones drawn
// in the published system; the size and the read timing are this design's
// choice (the original generated the memory with a vendor core generator).
// The contents are zero at start, as in a freshly configured block RAM.
module shared_mem #(
  parameter int unsigned ADDR_W = 7
) (
  input  logic              clk,
  input  logic              write_en,
  input  logic [ADDR_W-1:0] address,
  input  logic [7:0]        data_in,
  output logic [7:0]        data_out
);

  logic [7:0] mem [2**ADDR_W] = '{default: 8'h00};

  always_ff @(posedge clk) begin
    if (write_en) mem[address] <= data_in;
    data_out <= mem[address];
  end

endmodule
