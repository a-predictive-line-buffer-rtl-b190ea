// liar: Last Instruction Address Register.
//
// Holds the address of the most recently fetched instruction.  When the next
// fetch misses in the line buffer, this address is the start address of the
// new key instruction trace (KIT) written into the Instruction Trace Table.
// The register is loaded at the end of every fetch, whichever way the fetch
// was served.
//
// Interface: load_i with addr_i writes the register at the rising clock edge;
// addr_o is the held address and valid_o tells that at least one fetch has
// completed since reset (before that there is no start address, so no KIT may
// be recorded).  The valid flag and the reset are this design's choice.
module liar #(
  parameter int unsigned ADDR_W = kitps_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_i,
  input  logic [ADDR_W-1:0] addr_i,
  output logic [ADDR_W-1:0] addr_o,
  output logic              valid_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_o  <= '0;
      valid_o <= 1'b0;
    end else if (load_i) begin
      addr_o  <= addr_i;
      valid_o <= 1'b1;
    end
  end

endmodule
