// wb_rw_gen: Wishbone read and write strobe generation.
//
// A bus transfer is in progress while CYC_I and STB_I are both high; WE_I tells a write from a
// read. This block turns the three bus inputs into a read strobe rd and a write strobe wr,
// which stay high for as long as the master holds the transfer (until it sees ACK_O).
// Purely combinational. The block and its inputs are named in the design's block diagram;
// the logic is the plain Wishbone classic-cycle rule.
module wb_rw_gen (
  input  logic i_wb_cyc,
  input  logic i_wb_stb,
  input  logic i_wb_we,
  output logic rd,
  output logic wr
);

  always_comb begin
    rd = i_wb_cyc & i_wb_stb & ~i_wb_we;
    wr = i_wb_cyc & i_wb_stb &  i_wb_we;
  end

endmodule
