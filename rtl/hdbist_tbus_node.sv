// hdbist_tbus_node: one stage of the Test Chain Bus (TBus) ring.
//
// The TBus links the TProcessor and its TBlocks in a ring. Tokens travel
// BUS_W bits per clock, first bit first; an idle ring carries zeros and each
// token begins with a start bit of 1 on lane 0. Every node delays the ring by
// one whole token: incoming beats shift into a token-sized register, and when
// the start bit has reached the output end the complete token sits in the
// register. In that cycle the node checks the header parity and the address.
// If the token is for this node (its own address or the broadcast address)
// it sets the ack bit, ANDs the selected TSR bit into val for a read, and
// raises wr_en for one cycle for a write; the (possibly changed) token then
// leaves on tbus_out beat by beat while the next one shifts in. A token with a
// bad parity is forwarded untouched, so the TProcessor sees no ack and flags
// a structural fault.
//
// Ring, token-based protocol, single-cast and broadcast addresses, and
// one-bit TCR writes / TSR reads follow the HD-BIST scheme; the store-and-
// forward stage, the framing and the AND-combining of broadcast reads are
// this design's choices.
//
// Timing: latency from tbus_in to tbus_out is NBEATS = ceil(TOKEN_W/BUS_W)
// cycles. tbus_out depends on registers and tsr only, never on tbus_in.
module hdbist_tbus_node
  import hdbist_pkg::*;
#(
  parameter int unsigned       BUS_W = 1,
  parameter logic [ADDR_W-1:0] ADDR  = '0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [BUS_W-1:0]       tbus_in,
  output logic [BUS_W-1:0]       tbus_out,
  // Status bits read by TSR tokens (bit index = token sel).
  input  logic [(1<<SEL_W)-1:0]  tsr,
  // One-cycle TCR write strobe.
  output logic                   wr_en,
  output logic [SEL_W-1:0]       wr_sel,
  output logic                   wr_val,
  // One-cycle pulse: a token with a bad header parity passed by.
  output logic                   par_err
);

  localparam int unsigned NBEATS = (TOKEN_W + BUS_W - 1) / BUS_W;
  localparam int unsigned PAD_W  = NBEATS * BUS_W;
  localparam int unsigned CNT_W  = $clog2(NBEATS + 1);

  logic [PAD_W-1:0] sr, sr_mod;
  logic [CNT_W-1:0] skip;
  logic             present, hit, par_ok;
  token_t           tok, tok_mod;

  assign tok     = token_t'(sr[TOKEN_W-1:0]);
  assign present = sr[0] && (skip == '0);
  assign par_ok  = (hdr_parity(tok) == tok.par);
  assign hit     = present && par_ok && (tok.addr == ADDR || tok.addr == BCAST_ADDR);

  always_comb begin
    tok_mod = tok;
    if (hit) begin
      tok_mod.ack = 1'b1;
      if (tok.op) tok_mod.val = tok.val & tsr[tok.sel];
    end
    sr_mod = sr;
    sr_mod[TOKEN_W-1:0] = tok_mod;
  end

  assign tbus_out = sr_mod[BUS_W-1:0];
  assign wr_en    = hit && !tok.op;
  assign wr_sel   = tok.sel;
  assign wr_val   = tok.val;
  assign par_err  = present && !par_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      skip <= '0;
    end else begin
      sr <= (sr_mod >> BUS_W) | (PAD_W'(tbus_in) << (PAD_W - BUS_W));
      if (present)        skip <= CNT_W'(NBEATS - 1);
      else if (skip != 0) skip <= skip - 1'b1;
    end
  end

endmodule
