// htree_switch: one switch of the global H-tree (fat tree).
//
// Every switch joins two child busses of N bits to one parent bus of 2N bits,
// on both paths:
//   input path : the lower or upper N bits from the parent go down to the
//                left and/or right child;
//   output path: the N-bit bus from a child goes up as the lower or upper
//                half of the 2N-bit bus to the parent;
//   turnaround : a child's output-path bus goes straight back down the input
//                path to either child, so data need not climb higher than
//                the lowest level that covers both ends.
// The four outgoing N-bit busses (left child, right child, parent low half,
// parent high half) are each made of N/M portions of M bits. Every portion
// has its own link setting, a mgr_pkg::link_src_e code, so bit i of a
// portion is taken from bit i of the chosen source bus or is zero; several
// sources can share one outgoing bus as long as they use different portions.
// Settings are written with CFG_SWITCH commands addressed to this switch's
// ID (index = {destination, portion}) and are cleared by reset.
// With REG = 1 the four outgoing busses are registered (one cycle); the
// array registers every second level, i.e. half a cycle per level as the
// document gives for the static cell. The half-and-half split, the link codes
// and the command format are this design's choices.
module htree_switch #(
  parameter int unsigned N   = 8,    // child bus width in bits
  parameter int unsigned ID  = 1,    // switch number, heap order
  parameter bit          REG = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  mgr_pkg::cfg_cmd_t    cfg_cmd,
  input  logic [2*N-1:0]       p_in,    // input path, from the parent
  output logic [2*N-1:0]       p_out,   // output path, to the parent
  input  logic [N-1:0]         cl_out,  // output path, from the left child
  input  logic [N-1:0]         cr_out,  // output path, from the right child
  output logic [N-1:0]         cl_in,   // input path, to the left child
  output logic [N-1:0]         cr_in    // input path, to the right child
);
  import mgr_pkg::*;
  localparam int unsigned P = N / M;   // portions per child bus

  link_src_e sel [4][P];
  logic [N-1:0] nxt [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int dd = 0; dd < 4; dd++)
        for (int q = 0; q < int'(P); q++) sel[dd][q] <= LNK_NONE;
    end else if (cfg_cmd.valid && cfg_cmd.kind == CFG_SWITCH && cfg_cmd.unit == 16'(ID)) begin
      sel[cfg_cmd.index[15:14]][cfg_cmd.index[13:0] % P] <= link_src_e'(cfg_cmd.data[2:0]);
    end
  end

  always_comb begin
    for (int dd = 0; dd < 4; dd++)
      for (int q = 0; q < int'(P); q++)
        unique case (sel[dd][q])
          LNK_PLO: nxt[dd][q*M +: M] = p_in[q*M +: M];
          LNK_PHI: nxt[dd][q*M +: M] = p_in[N + q*M +: M];
          LNK_CL:  nxt[dd][q*M +: M] = cl_out[q*M +: M];
          LNK_CR:  nxt[dd][q*M +: M] = cr_out[q*M +: M];
          default: nxt[dd][q*M +: M] = '0;
        endcase
  end

  if (REG) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cl_in <= '0; cr_in <= '0; p_out <= '0;
      end else begin
        cl_in <= nxt[SW_CIN_L];
        cr_in <= nxt[SW_CIN_R];
        p_out <= {nxt[SW_POUT_H], nxt[SW_POUT_L]};
      end
    end
  end else begin : g_comb
    assign cl_in = nxt[SW_CIN_L];
    assign cr_in = nxt[SW_CIN_R];
    assign p_out = {nxt[SW_POUT_H], nxt[SW_POUT_L]};
  end
endmodule
