// clir: Cache Line Index Register.
//
// In an n-way set associative cache exactly one wordline (one way of the
// addressed set) is selected by each access.  The CLIR turns that one-hot
// wordline vector into the log2(n)-bit way number with a plain OR encoder
// (a 4-2 encoder for the 4-way cache) and holds it.  Together with the index
// of the effective address it forms the cache line address (CLA) of a key
// instruction trace.
//
// Interface: wl_i is the one-hot wordline vector of the current access, load_i
// captures its encoding at the next rising clock edge; clir_o is the held
// value, enc_o the combinational encoding of wl_i.  Reset clears the register.
// The encoder and the register follow the document; the asynchronous
// active-low reset is this design's choice.
module clir #(
  parameter int unsigned WAYS  = kitps_pkg::WAYS,
  parameter int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WAYS-1:0]  wl_i,
  input  logic             load_i,
  output logic [WAY_W-1:0] enc_o,
  output logic [WAY_W-1:0] clir_o
);

  // OR encoder: output bit b is the OR of every wordline whose number has bit b set
  always_comb begin
    enc_o = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (wl_i[w]) enc_o = enc_o | WAY_W'(w);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      clir_o <= '0;
    else if (load_i) clir_o <= enc_o;
  end

  // A cache access selects at most one wordline
  a_onehot : assert property (@(posedge clk) disable iff (!rst_n)
                              load_i |-> $onehot(wl_i));

endmodule
