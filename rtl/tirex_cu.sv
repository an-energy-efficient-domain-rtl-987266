// tirex_cu: TiReX control unit.
//
// Central controller of a tile. It keeps the program counter (pc), the data
// pointer (dp), the start of the current match attempt and the match /
// not-match status; it chooses which fetch/decode unit feeds the execute
// stage in the next cycle, drives the instruction-memory prefetch addresses,
// the data-buffer pointer and the stack buffer, and reports found/complete.
//
// Prefetching (one instruction executes per cycle on the common paths):
//   FDU-A always holds instruction 0   -> rollback after a false partial match
//                                          and repeated search at pc 0
//   FDU-B holds instruction pc+1        -> sequential execution
//   FDU-C holds the target of the top   -> loop back-jump (OKP: body start) or
//         stack context                    OR-chain exit (JIM: its address)
//
// Execution of the instruction in the execute stage (m = engine match):
//   plain AND/OR/ANY  m: dp += advance, go to pc+1.   !m: fail.
//     At pc 0 in the not-matching state all clusters search NCluster start
//     positions at once; a miss moves dp by NCluster (no penalty cycle).
//   '(' call          push GROUP context, go to pc+1.
//   OKP  (ref = address of the loop's closing instruction)
//                     push LOOP {body = pc+1, close, saved dp}, go to pc+1.
//   JIM  (ref = address after the OR chain)
//                     push ORCHAIN {exit, saved dp}, go to pc+1.
//   ')'  closer       m: pop, pc+1.  !m: pop and fail.
//   ')*' / ')+' closer (top is LOOP)
//                     m: iteration done: save dp, jump back to body (FDU-C).
//                        An iteration that consumed nothing ends the loop.
//                     !m: restore saved dp, pop, continue at pc+1; for ')+'
//                        with no completed iteration, fail instead.
//   ')|' closer (top is ORCHAIN)
//                     m: pop, jump to the chain exit (FDU-C).
//                     !m: restore saved dp and try the next alternative at
//                        pc+1; after the last one, pop and fail.
//   EOP               match found: complete.
// Failure of an instruction looks at the top context:
//   empty stack: roll back to pc 0 (FDU-A); the next attempt starts one
//     character after the previous attempt start (or NCluster after the
//     search window); past the end of data the run completes with no match.
//   LOOP: restore its saved dp, redirect to its closing instruction, which
//     then executes in "exit" mode (one bubble cycle).
//   ORCHAIN: restore its saved dp and skip forward, counting nesting, to the
//     instruction after the ')|' that closes the current alternative.
//   GROUP: pop it and repeat the failure on the next context (one cycle).
// The matcher is greedy and depth-first: it does not backtrack into a loop
// that has already exited.
//
// Interface: pulse `start` with sod/eod stable; `done` rises and stays high
// with `found`, `match_start`, `match_end` (exclusive) and `error` (malformed
// program or stack overflow) until the next start.
// Timing: start in cycle 0, fetch/decode of instruction 0 in cycle 1, its
// execution in cycle 2, one instruction per cycle after that, done the cycle
// after EOP executes.
//
// What follows the document: the two-stage pipeline, the three FDUs and their
// roles, the match/not-match states, the NCluster-wide search at the first
// instruction, the call/return context stack and the operator meanings. This
// design's own choices: the operand layout of OKP and JIM, the restart
// position after a failed attempt, the exit-mode and skip mechanisms for
// multi-instruction loop bodies and alternatives, and the error handling.
// Constant output: load_bc is always 1 in this version (FDU-B and FDU-C
// reload every cycle from the addresses given); the port is kept so that a
// later version can hold them to save power.
module tirex_cu
  import tirex_pkg::*;
#(
  parameter int unsigned NCL         = 4,
  parameter int unsigned CW          = 4,
  parameter int unsigned IM_DEPTH    = 256,
  parameter int unsigned BYTES       = 16384,
  localparam int unsigned PCW  = $clog2(IM_DEPTH),
  localparam int unsigned DPW  = $clog2(BYTES) + 1,
  localparam int unsigned OFW  = $clog2(NCL + CW + 1),
  localparam int unsigned CTXW = 2 + 2 * PCW + DPW + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // run control
  input  logic             start,
  input  logic [DPW-1:0]   sod,
  input  logic [DPW-1:0]   eod,
  output logic             busy,
  output logic             done,
  output logic             found,
  output logic             error,
  output logic [DPW-1:0]   match_start,
  output logic [DPW-1:0]   match_end,
  // instruction in the execute stage (selected FDU outputs)
  input  cm_op_e           ex_cm,
  input  cf_op_e           ex_cf,
  input  logic [PCW-1:0]   ex_addr,    // OKP/JIM operand: low bits of the reference
  // engine
  output logic             search,
  input  logic             eng_match,
  input  logic [OFW-1:0]   eng_start_off,
  input  logic [OFW-1:0]   eng_advance,
  // fetch/decode units
  output fdu_sel_e         fdu_sel,
  output logic             load_a,
  output logic             load_bc,
  output logic [PCW-1:0]   addr_b,
  output logic [PCW-1:0]   addr_c,
  // data buffer
  output logic [DPW-1:0]   next_dp,
  // stack buffer
  output logic             stk_clear,
  output logic             stk_push,
  output logic             stk_pop,
  output logic             stk_wr_top,
  output logic [CTXW-1:0]  stk_din,
  input  logic [CTXW-1:0]  stk_top,
  input  logic             stk_empty,
  input  logic             stk_full,
  // execution events, one pulse per occurrence (for counters and tests)
  output logic             ev_rollback,
  output logic             ev_loop_back,
  output logic             ev_alt_next,
  output logic             ev_chain_exit,
  output logic             ev_redirect
);

  typedef struct packed {
    ctx_kind_e      kind;
    logic [PCW-1:0] target;  // LOOP: body start, ORCHAIN: exit address
    logic [PCW-1:0] close;   // LOOP: address of the closing instruction
    logic [DPW-1:0] saved;   // data pointer to restore on failure
    logic           iter;    // LOOP: at least one iteration completed
  } ctx_t;

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_RUN, S_REDIR, S_UNWIND, S_SKIP, S_DONE
  } state_e;

  state_e          st_q, st_d;
  logic [PCW-1:0]  pc_q, pc_d;
  logic [DPW-1:0]  dp_q, dp_d;
  logic [DPW-1:0]  sdp_q, sdp_d;       // start of the current attempt
  logic            matching_q, matching_d;
  logic            exit_q, exit_d;     // next closer runs in loop-exit mode
  logic [PCW-1:0]  depth_q, depth_d;   // nesting depth for skip / unwind
  fdu_sel_e        sel_q, sel_d;
  logic            found_q, found_d, err_q, err_d;
  logic [DPW-1:0]  mend_q, mend_d;

  ctx_t top, push_ctx;
  assign top = ctx_t'(stk_top);

  logic plain_cm;
  assign plain_cm = (ex_cm == CM_AND) || (ex_cm == CM_OR) || (ex_cm == CM_ANY);

  logic [PCW-1:0] ref_addr;
  assign ref_addr = ex_addr;

  logic [DPW-1:0] dp_adv;
  assign dp_adv = dp_q + DPW'(eng_advance);

  assign search = (st_q == S_RUN) && !exit_q && !matching_q && (pc_q == '0)
                  && plain_cm && (ex_cf == CF_NONE);

  logic fail;
  logic [PCW-1:0] fail_depth;
  logic [DPW-1:0] restart;

  always_comb begin
    st_d       = st_q;
    pc_d       = pc_q;
    dp_d       = dp_q;
    sdp_d      = sdp_q;
    matching_d = matching_q;
    exit_d     = exit_q;
    depth_d    = depth_q;
    sel_d      = sel_q;
    found_d    = found_q;
    err_d      = err_q;
    mend_d     = mend_q;
    stk_clear  = 1'b0;
    stk_push   = 1'b0;
    stk_pop    = 1'b0;
    stk_wr_top = 1'b0;
    push_ctx   = '0;
    fail       = 1'b0;
    fail_depth = '0;
    load_a     = 1'b0;
    ev_rollback   = 1'b0;
    ev_loop_back  = 1'b0;
    ev_alt_next   = 1'b0;
    ev_chain_exit = 1'b0;
    ev_redirect   = 1'b0;

    unique case (st_q)
      S_IDLE, S_DONE: begin
        if (start) begin
          st_d       = S_FETCH;
          pc_d       = '0;
          dp_d       = sod;
          sdp_d      = sod;
          matching_d = 1'b0;
          exit_d     = 1'b0;
          found_d    = 1'b0;
          err_d      = 1'b0;
          mend_d     = '0;
          stk_clear  = 1'b1;
        end
      end

      S_FETCH: begin
        load_a = 1'b1;
        sel_d  = FDU_A;
        st_d   = S_RUN;
      end

      S_REDIR: begin
        // FDU-B is being loaded with the redirect target (pc).
        sel_d = FDU_B;
        st_d  = S_RUN;
      end

      S_UNWIND: begin
        fail       = 1'b1;
        fail_depth = depth_q;
      end

      S_SKIP: begin
        // Walk forward over the rest of a failed alternative.
        pc_d  = pc_q + PCW'(1);
        sel_d = FDU_B;
        if (ex_cm == CM_NONE && ex_cf == CF_NONE) begin
          err_d = 1'b1;               // EOP inside an OR chain: malformed
          st_d  = S_DONE;
        end else if (ex_cm == CM_CALL || ex_cf == CF_OKP || ex_cf == CF_JIM) begin
          depth_d = depth_q + PCW'(1);
        end else if (ex_cf == CF_RET || ex_cf == CF_STAR || ex_cf == CF_PLUS || ex_cf == CF_ALT) begin
          if (depth_q != '0) begin
            depth_d = depth_q - PCW'(1);
          end else if (pc_q + PCW'(1) == top.target) begin
            // That was the last alternative: the whole chain fails.
            stk_pop = 1'b1;
            pc_d    = pc_q;
            depth_d = '0;
            st_d    = S_UNWIND;
          end else begin
            st_d        = S_RUN;
            ev_alt_next = 1'b1;
          end
        end
      end

      S_RUN: begin
        matching_d = 1'b1;
        if (exit_q) begin
          // Closing instruction of a loop reached by a failure in its body.
          exit_d  = 1'b0;
          stk_pop = 1'b1;
          if (top.kind != CTX_LOOP || !(ex_cf == CF_STAR || ex_cf == CF_PLUS)) begin
            err_d = 1'b1;
            st_d  = S_DONE;
          end else if (ex_cf == CF_STAR || top.iter) begin
            pc_d  = pc_q + PCW'(1);
            sel_d = FDU_B;
          end else begin
            st_d    = S_UNWIND;
            depth_d = '0;
          end
        end else if (ex_cm == CM_NONE && ex_cf == CF_NONE) begin
          // EOP: the whole expression matched.
          found_d = 1'b1;
          mend_d  = dp_q;
          st_d    = S_DONE;
        end else if (ex_cf == CF_OKP || ex_cf == CF_JIM || ex_cm == CM_CALL) begin
          if (stk_full) begin
            err_d = 1'b1;
            st_d  = S_DONE;
          end else begin
            stk_push       = 1'b1;
            push_ctx.saved = dp_q;
            if (ex_cf == CF_OKP) begin
              push_ctx.kind   = CTX_LOOP;
              push_ctx.target = pc_q + PCW'(1);
              push_ctx.close  = ref_addr;
            end else if (ex_cf == CF_JIM) begin
              push_ctx.kind   = CTX_ORCHAIN;
              push_ctx.target = ref_addr;
            end else begin
              push_ctx.kind   = CTX_GROUP;
            end
            pc_d  = pc_q + PCW'(1);
            sel_d = FDU_B;
          end
        end else if (ex_cf == CF_STAR || ex_cf == CF_PLUS) begin
          if (stk_empty || top.kind != CTX_LOOP) begin
            err_d = 1'b1;
            st_d  = S_DONE;
          end else if (eng_match && dp_adv != top.saved) begin
            stk_wr_top     = 1'b1;
            push_ctx       = top;
            push_ctx.saved = dp_adv;
            push_ctx.iter  = 1'b1;
            dp_d           = dp_adv;
            pc_d           = top.target;
            sel_d          = FDU_C;
            ev_loop_back   = 1'b1;
          end else if (eng_match || ex_cf == CF_STAR || top.iter) begin
            stk_pop = 1'b1;
            dp_d    = eng_match ? dp_adv : top.saved;
            pc_d    = pc_q + PCW'(1);
            sel_d   = FDU_B;
          end else begin
            stk_pop = 1'b1;
            dp_d    = top.saved;
            st_d    = S_UNWIND;
            depth_d = '0;
          end
        end else if (ex_cf == CF_ALT) begin
          if (stk_empty || top.kind != CTX_ORCHAIN) begin
            err_d = 1'b1;
            st_d  = S_DONE;
          end else if (eng_match) begin
            stk_pop       = 1'b1;
            dp_d          = dp_adv;
            pc_d          = top.target;
            sel_d         = FDU_C;
            ev_chain_exit = 1'b1;
          end else begin
            dp_d = top.saved;
            if (pc_q + PCW'(1) == top.target) begin
              stk_pop = 1'b1;
              st_d    = S_UNWIND;
              depth_d = '0;
            end else begin
              pc_d        = pc_q + PCW'(1);
              sel_d       = FDU_B;
              ev_alt_next = 1'b1;
            end
          end
        end else if (ex_cf == CF_RET) begin
          if (stk_empty || top.kind != CTX_GROUP) begin
            err_d = 1'b1;
            st_d  = S_DONE;
          end else begin
            stk_pop = 1'b1;
            if (eng_match) begin
              dp_d  = dp_adv;
              pc_d  = pc_q + PCW'(1);
              sel_d = FDU_B;
            end else begin
              st_d    = S_UNWIND;
              depth_d = '0;
            end
          end
        end else begin
          // Plain character match.
          if (eng_match) begin
            dp_d  = dp_adv;
            pc_d  = pc_q + PCW'(1);
            sel_d = FDU_B;
            if (search) sdp_d = dp_q + DPW'(eng_start_off);
          end else begin
            fail = 1'b1;
          end
        end
      end

      default: st_d = S_IDLE;
    endcase

    // Failure of the instruction at pc_q, handled by the top context.
    restart = search ? dp_adv : sdp_q + DPW'(1);
    if (fail) begin
      if (stk_empty) begin
        ev_rollback = 1'b1;
        stk_clear   = 1'b1;
        if (restart >= eod) begin
          st_d = S_DONE;
        end else begin
          st_d       = S_RUN;
          pc_d       = '0;
          dp_d       = restart;
          sdp_d      = restart;
          matching_d = 1'b0;
          sel_d      = FDU_A;
        end
      end else begin
        unique case (top.kind)
          CTX_LOOP: begin
            dp_d        = top.saved;
            pc_d        = top.close;
            exit_d      = 1'b1;
            st_d        = S_REDIR;
            ev_redirect = 1'b1;
          end
          CTX_ORCHAIN: begin
            dp_d    = top.saved;
            pc_d    = pc_q + PCW'(1);
            depth_d = fail_depth;
            sel_d   = FDU_B;
            st_d    = S_SKIP;
          end
          default: begin
            stk_pop = 1'b1;
            depth_d = fail_depth + PCW'(1);
            st_d    = S_UNWIND;
          end
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= S_IDLE;
      pc_q       <= '0;
      dp_q       <= '0;
      sdp_q      <= '0;
      matching_q <= 1'b0;
      exit_q     <= 1'b0;
      depth_q    <= '0;
      sel_q      <= FDU_A;
      found_q    <= 1'b0;
      err_q      <= 1'b0;
      mend_q     <= '0;
    end else begin
      st_q       <= st_d;
      pc_q       <= pc_d;
      dp_q       <= dp_d;
      sdp_q      <= sdp_d;
      matching_q <= matching_d;
      exit_q     <= exit_d;
      depth_q    <= depth_d;
      sel_q      <= sel_d;
      found_q    <= found_d;
      err_q      <= err_d;
      mend_q     <= mend_d;
    end
  end

  assign stk_din     = push_ctx;
  assign fdu_sel     = sel_q;
  assign next_dp     = dp_d;
  // FDU-B: instruction after pc, or pc itself while a redirect settles.
  assign addr_b      = (st_q == S_REDIR) ? pc_q : pc_q + PCW'(1);
  assign addr_c      = stk_empty ? '0 : top.target;
  assign load_bc     = 1'b1;
  assign busy        = (st_q != S_IDLE) && (st_q != S_DONE);
  assign done        = (st_q == S_DONE);
  assign found       = found_q;
  assign error       = err_q;
  assign match_start = sdp_q;
  assign match_end   = mend_q;

endmodule
