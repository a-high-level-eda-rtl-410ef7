// hdbist_tprocessor: Test Processor, the controller of one HD-BIST chain.
//
// It runs a compiled schedule (PROG, a list of instr_t) by sending tokens
// around its Test Chain Bus ring and reading back what the blocks wrote into
// them. Only one token is on the ring at a time: the processor sends it,
// waits for it to come back, checks it and then decides the next one.
//
// Scheduling primitives:
//   TEST  write TCR RUN = 1 to each target (one broadcast token for "all").
//   WAIT  poll DONE of each target until it reads 1 (one broadcast read for
//         "all", which is 1 only when every block is done), then read GOOD
//         of each target and record failures in fail_map.
//   STOP  as WAIT, but a failure among its targets aborts the schedule.
//   DIAG  (top chain only) read GOOD of every block; for a failed block that
//         is itself a TProcessor (IS_TP), read its lower chain's GOOD flags
//         (TSR bits 2..) and log the address pair of each faulty lower block;
//         log the TProcessor's own address when none of them is marked (its
//         own chain broke). Other failed blocks are logged by their address.
//   END   finish: done = 1, pass = no failure, no abort, no structural fault.
//
// Self-checking: every returning token must carry its start bit, the header
// it was sent with, a good parity and ack = 1 (some block accepted it); a
// token that does not come back within TIMEOUT cycles, or fails a check,
// sets struct_fault and ends the schedule.
//
// Hierarchy: with IS_TOP = 0 the processor is also a TBlock on the upper
// chain (an hdbist_tblock at address UP_ADDR on up_in/up_out). A RUN write
// from above starts the schedule, DONE/GOOD report its end and result, and
// TSR bits 2.. carry the GOOD flag of each lower-chain block. With IS_TOP = 1
// the schedule starts on the start input and the up ports are unused.
//
// Timing: each token takes NBEATS cycles to send and (N_BLOCKS+1)*NBEATS
// cycles to return, plus one cycle to issue and one to evaluate.
//
// The primitives, the polling, the abort of STOP, diagnosis from the top
// only, and "a TProcessor is a TBlock to the upper chain" follow the HD-BIST
// scheme; the instruction encoding, the two-level diagnosis address and the
// self-checks are this design's own.
module hdbist_tprocessor
  import hdbist_pkg::*;
#(
  parameter int unsigned             N_BLOCKS   = 3,
  parameter int unsigned             BUS_W      = 1,
  parameter bit                      IS_TOP     = 1'b1,
  parameter logic [ADDR_W-1:0]       UP_ADDR    = '0,
  parameter prog_t                   PROG       = TOP_PROG,
  parameter logic [MAXB-1:0]         IS_TP      = 7'b0000001,
  parameter logic [MAXB-1:0][2:0]    SUB_N      = {18'd0, 3'd2},
  parameter int unsigned             DIAG_DEPTH = 8,
  parameter int unsigned             TIMEOUT    =
      (N_BLOCKS + 1) * ((TOKEN_W + BUS_W - 1) / BUS_W) + 8
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // Start of the schedule (top chain only).
  input  logic                             start,
  output logic                             done,
  output logic                             pass,
  output logic                             struct_fault,
  output logic [MAXB-1:0]                  fail_map,
  output logic [$clog2(DIAG_DEPTH+1)-1:0]  diag_count,
  output diag_entry_t [DIAG_DEPTH-1:0]     diag_log,
  // Lower chain.
  output logic [BUS_W-1:0]                 tbus_out,
  input  logic [BUS_W-1:0]                 tbus_in,
  // Upper chain (IS_TOP = 0).
  input  logic [BUS_W-1:0]                 up_in,
  output logic [BUS_W-1:0]                 up_out
);

  localparam int unsigned NBEATS = (TOKEN_W + BUS_W - 1) / BUS_W;
  localparam int unsigned PAD_W  = NBEATS * BUS_W;
  localparam int unsigned BCW    = $clog2(NBEATS + 1);
  localparam int unsigned TOW    = $clog2(TIMEOUT + 1);
  localparam int unsigned PCW    = $clog2(PROG_MAX);
  localparam int unsigned DCW    = $clog2(DIAG_DEPTH + 1);
  localparam logic [MAXB-1:0] ALL_MASK = MAXB'((1 << N_BLOCKS) - 1);

  // ---------------------------------------------------------------- token engine
  typedef enum logic [1:0] {M_IDLE, M_SEND, M_WAIT} mstate_e;

  mstate_e          mstate;
  logic [PAD_W-1:0] tx_sr, rx_sr;
  logic [BCW-1:0]   tx_cnt, rx_cnt;
  logic [TOW-1:0]   tmo;
  token_t           sent, rx_tok;
  logic             m_go, m_done, m_err;
  token_t           m_tok;

  assign tbus_out = (mstate == M_SEND) ? tx_sr[BUS_W-1:0] : '0;
  assign rx_tok   = token_t'(rx_sr[TOKEN_W-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mstate <= M_IDLE;
      tx_sr  <= '0;
      rx_sr  <= '0;
      tx_cnt <= '0;
      rx_cnt <= '0;
      tmo    <= '0;
      sent   <= '0;
      m_done <= 1'b0;
      m_err  <= 1'b0;
    end else begin
      m_done <= 1'b0;
      case (mstate)
        M_IDLE: if (m_go) begin
          mstate <= M_SEND;
          tx_sr  <= PAD_W'(m_tok);
          sent   <= m_tok;
          tx_cnt <= '0;
          rx_cnt <= '0;
          tmo    <= '0;
        end
        M_SEND, M_WAIT: begin
          tmo <= tmo + 1'b1;
          if (mstate == M_SEND) begin
            tx_sr  <= tx_sr >> BUS_W;
            tx_cnt <= tx_cnt + 1'b1;
            if (tx_cnt == BCW'(NBEATS - 1)) mstate <= M_WAIT;
          end
          // Collect the returning token from its start beat on.
          if ((rx_cnt != '0 && rx_cnt != BCW'(NBEATS)) || (rx_cnt == '0 && tbus_in[0])) begin
            rx_sr  <= (rx_sr >> BUS_W) | (PAD_W'(tbus_in) << (PAD_W - BUS_W));
            rx_cnt <= rx_cnt + 1'b1;
          end
          if (rx_cnt == BCW'(NBEATS)) begin
            mstate <= M_IDLE;
            m_done <= 1'b1;
            m_err  <= !rx_tok.start || !rx_tok.ack
                      || rx_tok.par != hdr_parity(rx_tok)
                      || rx_tok.op != sent.op || rx_tok.sel != sent.sel
                      || rx_tok.addr != sent.addr;
          end else if (tmo == TOW'(TIMEOUT)) begin
            mstate <= M_IDLE;
            m_done <= 1'b1;
            m_err  <= 1'b1;
          end
        end
        default: mstate <= M_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- scheduler
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_ISSUE, S_WAITTOK, S_DONE} sstate_e;
  typedef enum logic [2:0] {PH_TEST, PH_POLL, PH_CHECK, PH_DTOP, PH_DSUB} phase_e;

  sstate_e           sstate;
  phase_e            phase;
  logic [PCW-1:0]    pc;
  instr_t            ins;
  logic [MAXB-1:0]   tmask;
  logic              bcast, ifail, aborted, subfound;
  logic [ADDR_W-1:0] bi;
  logic [2:0]        sk;
  logic              run_req;
  logic              resp;

  assign ins  = PROG[pc];
  assign resp = rx_tok.val;

  // First set bit of m at or above index 'from'; N_BLOCKS when none.
  function automatic logic [ADDR_W-1:0] next_tgt(logic [MAXB-1:0] m, int unsigned from);
    next_tgt = ADDR_W'(N_BLOCKS);
    for (int i = MAXB - 1; i >= 0; i--)
      if (i >= int'(from) && i < int'(N_BLOCKS) && m[i]) next_tgt = ADDR_W'(i);
  endfunction

  always_comb begin
    m_go  = (sstate == S_ISSUE);
    m_tok = make_token(1'b1, TSR_DONE, bcast ? BCAST_ADDR : bi, 1'b1);
    case (phase)
      PH_TEST:  m_tok = make_token(1'b0, TCR_RUN, bcast ? BCAST_ADDR : bi, 1'b1);
      PH_POLL:  m_tok = make_token(1'b1, TSR_DONE, bcast ? BCAST_ADDR : bi, 1'b1);
      PH_CHECK,
      PH_DTOP:  m_tok = make_token(1'b1, TSR_GOOD, bi, 1'b1);
      PH_DSUB:  m_tok = make_token(1'b1, SEL_W'(TSR_SUB0 + sk), bi, 1'b1);
      default:  ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sstate       <= S_IDLE;
      phase        <= PH_TEST;
      pc           <= '0;
      tmask        <= '0;
      bcast        <= 1'b0;
      ifail        <= 1'b0;
      aborted      <= 1'b0;
      subfound     <= 1'b0;
      bi           <= '0;
      sk           <= '0;
      struct_fault <= 1'b0;
      fail_map     <= '0;
      diag_count   <= '0;
      diag_log     <= '0;
    end else begin
      case (sstate)
        S_IDLE, S_DONE: if (run_req) begin
          sstate       <= S_FETCH;
          pc           <= '0;
          aborted      <= 1'b0;
          struct_fault <= 1'b0;
          fail_map     <= '0;
          diag_count   <= '0;
          diag_log     <= '0;
        end

        S_FETCH: begin
          bcast <= ins.all;
          tmask <= ins.all ? ALL_MASK : (ins.mask & ALL_MASK);
          bi    <= ins.all ? '0 : next_tgt(ins.mask, 0);
          ifail <= 1'b0;
          case (ins.op)
            OP_TEST, OP_WAIT, OP_STOP: begin
              phase <= (ins.op == OP_TEST) ? PH_TEST : PH_POLL;
              if (!ins.all && next_tgt(ins.mask, 0) == ADDR_W'(N_BLOCKS))
                pc <= pc + 1'b1;            // no target in this chain
              else
                sstate <= S_ISSUE;
            end
            OP_DIAG: begin
              if (IS_TOP) begin
                phase  <= PH_DTOP;
                bi     <= '0;
                sstate <= S_ISSUE;
              end else begin
                pc <= pc + 1'b1;            // diagnosis only from the top chain
              end
            end
            default: sstate <= S_DONE;    // OP_END
          endcase
        end

        S_ISSUE: sstate <= S_WAITTOK;

        S_WAITTOK: if (m_done) begin
          if (m_err) begin
            struct_fault <= 1'b1;
            aborted      <= 1'b1;
            sstate       <= S_DONE;
          end else begin
            case (phase)
              PH_TEST: begin
                if (bcast || next_tgt(tmask, int'(bi) + 1) == ADDR_W'(N_BLOCKS)) begin
                  pc     <= pc + 1'b1;
                  sstate <= S_FETCH;
                end else begin
                  bi     <= next_tgt(tmask, int'(bi) + 1);
                  sstate <= S_ISSUE;
                end
              end
              PH_POLL: begin
                sstate <= S_ISSUE;
                if (resp) begin
                  if (bcast || next_tgt(tmask, int'(bi) + 1) == ADDR_W'(N_BLOCKS)) begin
                    phase <= PH_CHECK;
                    bi    <= next_tgt(tmask, 0);
                  end else begin
                    bi <= next_tgt(tmask, int'(bi) + 1);
                  end
                end
              end
              PH_CHECK: begin
                if (!resp) begin
                  fail_map[bi] <= 1'b1;
                  ifail        <= 1'b1;
                end
                if (next_tgt(tmask, int'(bi) + 1) == ADDR_W'(N_BLOCKS)) begin
                  if (ins.op == OP_STOP && (ifail || !resp)) begin
                    aborted <= 1'b1;
                    sstate  <= S_DONE;
                  end else begin
                    pc     <= pc + 1'b1;
                    sstate <= S_FETCH;
                  end
                end else begin
                  bi     <= next_tgt(tmask, int'(bi) + 1);
                  sstate <= S_ISSUE;
                end
              end
              PH_DTOP: begin
                if (!resp && IS_TP[bi] && SUB_N[bi] != 3'd0) begin
                  phase    <= PH_DSUB;
                  sk       <= '0;
                  subfound <= 1'b0;
                  sstate   <= S_ISSUE;
                end else begin
                  if (!resp) log_entry(bi, 1'b0, '0);
                  advance_diag();
                end
              end
              PH_DSUB: begin
                if (!resp) begin
                  log_entry(bi, 1'b1, ADDR_W'(sk));
                  subfound <= 1'b1;
                end
                if (sk + 1'b1 == SUB_N[bi]) begin
                  if (!subfound && resp) log_entry(bi, 1'b0, '0);
                  phase <= PH_DTOP;
                  advance_diag();
                end else begin
                  sk     <= sk + 1'b1;
                  sstate <= S_ISSUE;
                end
              end
              default: sstate <= S_DONE;
            endcase
          end
        end

        default: sstate <= S_IDLE;
      endcase
    end
  end

  task automatic log_entry(logic [ADDR_W-1:0] a, logic sv, logic [ADDR_W-1:0] sa);
    if (diag_count < DCW'(DIAG_DEPTH)) begin
      diag_log[diag_count] <= '{addr: a, sub_valid: sv, sub_addr: sa};
      diag_count           <= diag_count + 1'b1;
    end
  endtask

  task automatic advance_diag();
    if (bi + 1'b1 == ADDR_W'(N_BLOCKS)) begin
      pc     <= pc + 1'b1;
      sstate <= S_FETCH;
    end else begin
      bi     <= bi + 1'b1;
      sstate <= S_ISSUE;
    end
  endtask

  assign done = (sstate == S_DONE);
  assign pass = done && !aborted && !struct_fault && (fail_map == '0);

  // ---------------------------------------------------------------- upper chain
  generate
    if (IS_TOP) begin : g_top
      assign run_req = start;
      assign up_out  = '0;
    end else begin : g_sub
      logic             up_start;
      logic [EXT_MAX-1:0] sub_good;
      always_comb begin
        sub_good = '1;
        for (int k = 0; k < int'(N_BLOCKS) && k < int'(EXT_MAX); k++)
          sub_good[k] = !fail_map[k];
      end
      hdbist_tblock #(.BUS_W(BUS_W), .ADDR(UP_ADDR),
                      .START_PULSE(1'b1), .PASS_ACTIVE_LOW(1'b0)) u_up (
        .clk, .rst_n,
        .tbus_in    (up_in),
        .tbus_out   (up_out),
        .bist_start (up_start),
        .bist_done  (done),
        .bist_pass  (pass),
        .tsr_ext    (sub_good),
        .tsr_done   (),
        .tsr_good   (),
        .par_err    ()
      );
      assign run_req = up_start;
    end
  endgenerate

  // The compiler places DIAG only in the top chain's schedule.
  a_diag_top_only: assert property (@(posedge clk) disable iff (!rst_n)
      (sstate == S_FETCH && ins.op == OP_DIAG) |-> IS_TOP);

endmodule
