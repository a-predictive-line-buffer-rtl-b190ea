// line_buffer: the one-line instruction buffer in front of the cache.
//
// Holds one cache line together with its line address (tag and index of the
// effective address).  Every fetch address is compared with the held line
// address; on a hit the addressed instruction word is returned from the
// buffer and the cache is not touched.  The buffer is reloaded with a whole
// cache line, either the line just fetched from the cache or, when the
// Instruction Trace Table predicts a key instruction trace, the line the
// trace points to.
//
// Interface: addr_i is looked up combinationally (hit_o, instr_o).  load_i
// writes load_laddr_i / load_line_i at the rising edge, so a lookup in the
// following cycle sees the new line.  Words are packed with word 0 of the line
// in the least significant bits (this design's choice).  Reset empties the
// buffer.  Size (one cache line, 64 bytes) follows the document.
module line_buffer #(
  parameter int unsigned ADDR_W     = kitps_pkg::ADDR_W,
  parameter int unsigned INSTR_W    = kitps_pkg::INSTR_W,
  parameter int unsigned LINE_BYTES = kitps_pkg::LINE_BYTES,
  parameter int unsigned OFFSET_W   = $clog2(LINE_BYTES),
  parameter int unsigned LADDR_W    = ADDR_W - OFFSET_W,
  parameter int unsigned LINE_W     = LINE_BYTES * 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup
  input  logic [ADDR_W-1:0]  addr_i,
  output logic               hit_o,
  output logic [INSTR_W-1:0] instr_o,
  // reload with a cache line
  input  logic               load_i,
  input  logic [LADDR_W-1:0] load_laddr_i,
  input  logic [LINE_W-1:0]  load_line_i,
  // held line address, for observation
  output logic               valid_o,
  output logic [LADDR_W-1:0] laddr_o
);

  localparam int unsigned BYTE_W  = $clog2(INSTR_W / 8);
  localparam int unsigned WORDS   = LINE_W / INSTR_W;
  localparam int unsigned WSEL_W  = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [LINE_W-1:0] data_q;
  logic [WSEL_W-1:0] wsel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      laddr_o <= '0;
    end else if (load_i) begin
      valid_o <= 1'b1;
      laddr_o <= load_laddr_i;
    end
  end

  always_ff @(posedge clk) begin
    if (load_i) data_q <= load_line_i;
  end

  assign wsel    = WSEL_W'(addr_i[OFFSET_W-1:BYTE_W]);
  assign hit_o   = valid_o && (laddr_o == addr_i[ADDR_W-1:OFFSET_W]);
  assign instr_o = data_q[wsel*INSTR_W +: INSTR_W];

endmodule
