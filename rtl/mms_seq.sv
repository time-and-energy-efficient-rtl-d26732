// Sequencer of the matrix multiplication/subtraction array for one iteration.
//
// In iteration kk, with m = n/b - 1 - kk, it performs the m^2 opMMS
// operations A22(bi,bj) <- A22(bi,bj) - L21(bi) x U12(bj), block column by
// block column (bj outer, bi inner), writing each result in place. An
// operation may start once the LU sequencer has written both operand blocks;
// lu_seq produces them in the order L21(0), U12(0), L21(1..m-1),
// U12(1..m-1), so with blocks_done counting completed blocks (opLU first)
// L21(bi) is complete at count 2 (bi = 0) or 3+bi, and U12(bj) at count 3
// (bj = 0) or 2+m+bj. opMMS thereby runs while the LU array is still busy
// with opL/opU, the overlap of the design's faster schedule.
//
// Per operation and column group g (b/r groups of r columns) it issues b
// outer-product steps of b tokens each: token (i,k) carries C[i][k]; the first
// r tokens of a step also carry the D elements of the next step, or of the
// next group, or of the next operation when that one is already ready when its
// last step begins. Otherwise r preload tokens bring D[0][..] first. The r*b
// results of a finished group are read out by the following tokens (one per
// token, F element and write address attached); when no work follows, idle
// tokens carry the read-outs. So back-to-back operations cost b^3/r cycles
// each, plus r preload cycles whenever an operation has to wait for its
// inputs, plus r*b read-out cycles after the last one.
//
// Interface: start (one cycle) with kk, done (one cycle) when every result of
// the iteration is written. Memory: three read ports (C, D, F; data one cycle
// after the address) and one write port. mms_en disables the array while idle.
module mms_seq
  import lu_pkg::*;
#(
  parameter int N = 256,
  parameter int B = 16,
  parameter int R = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  idx_t     kk,
  input  idx_t     blocks_done,
  output logic     done,
  output logic     busy,
  // memory bank
  output addr_t    raddr_c,
  output addr_t    raddr_d,
  output addr_t    raddr_f,
  input  word_t    rdata_c,
  input  word_t    rdata_d,
  input  word_t    rdata_f,
  output logic     we,
  output addr_t    waddr,
  output word_t    wdata,
  // MMS array
  output logic     mms_en,
  output mms_tok_t tok,
  input  mms_tok_t res_tok,
  // activity, for observation
  output logic     ev_pre,
  output logic     ev_chain,
  output logic     ev_idle_readout
);

  localparam int NB = N / B;
  localparam int G  = B / R;

  typedef enum logic [2:0] {M_IDLE, M_WAITRDY, M_PRE, M_RUN, M_FIN} mode_e;

  mode_e mode;
  idx_t  m, bi, bj, g, i, k, pre_s;
  logic  chain_next;
  logic  rd_act;
  idx_t  rd_bi, rd_bj, rd_g, rd_row, rd_slot;
  idx_t  fin_cnt;

  function automatic addr_t at(int unsigned row, int unsigned col);
    return addr_t'(row * N + col);
  endfunction

  // ------------------------------------------------------------ issue logic
  logic  last_blk_row, last_op, next_ready, cur_ready, chain_now, group_end, last_group;
  idx_t  nbi, nbj;

  // blocks_done needed before L21(bi) and U12(bj) are both in memory
  function automatic logic operands_ready(idx_t cnt, idx_t mm, idx_t pi, idx_t pj);
    idx_t need_l, need_u;
    need_l = (pi == '0) ? idx_t'(2) : pi + idx_t'(3);
    need_u = (pj == '0) ? idx_t'(3) : mm + idx_t'(2) + pj;
    return cnt >= need_l && cnt >= need_u;
  endfunction
  int unsigned base_d;
  mms_tok_t skel;

  always_comb begin
    base_d       = int'(kk) * B;
    last_blk_row = bi + 1'b1 == m;
    nbi          = last_blk_row ? '0 : bi + 1'b1;
    nbj          = last_blk_row ? bj + 1'b1 : bj;
    last_op      = last_blk_row && (bj + 1'b1 == m);
    cur_ready    = operands_ready(blocks_done, m, bi, bj);
    next_ready   = !last_op && operands_ready(blocks_done, m, nbi, nbj);
    last_group   = g == idx_t'(G-1);
    chain_now    = (i == '0) ? next_ready : chain_next;
    group_end    = (i == idx_t'(B-1)) && (k == idx_t'(B-1));

    skel    = '0;
    raddr_c = '0;
    raddr_d = '0;
    raddr_f = '0;

    if (mode == M_RUN) begin
      skel.valid = 1'b1;
      skel.kind  = MK_RUN;
      skel.i     = i;
      skel.k     = k;
      raddr_c    = at(base_d + B * (int'(bi) + 1) + int'(i), base_d + int'(k));
      if (i < idx_t'(R)) begin
        skel.d_slot = i;
        if (k != idx_t'(B-1)) begin
          skel.d_valid = 1'b1;
          raddr_d = at(base_d + int'(k) + 1, base_d + B * (int'(bj) + 1) + R * int'(g) + int'(i));
        end else if (!last_group) begin
          skel.d_valid = 1'b1;
          raddr_d = at(base_d, base_d + B * (int'(bj) + 1) + R * (int'(g) + 1) + int'(i));
        end else if (chain_now) begin
          skel.d_valid = 1'b1;
          raddr_d = at(base_d, base_d + B * (int'(nbj) + 1) + int'(i));
        end
      end
    end else if (mode == M_PRE) begin
      skel.valid   = 1'b1;
      skel.kind    = MK_PRE;
      skel.d_valid = 1'b1;
      skel.d_slot  = pre_s;
      raddr_d = at(base_d, base_d + B * (int'(bj) + 1) + R * int'(g) + int'(pre_s));
    end

    if (rd_act) begin
      skel.valid    = 1'b1;
      skel.rd_valid = 1'b1;
      skel.rd_slot  = rd_slot;
      skel.rd_row   = rd_row;
      raddr_f       = at(base_d + B * (int'(rd_bi) + 1) + int'(rd_row),
                         base_d + B * (int'(rd_bj) + 1) + R * int'(rd_g) + int'(rd_slot));
      skel.wb_addr  = raddr_f;
    end
  end

  // -------------------------------------------------------------- control
  mms_tok_t skel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= M_IDLE;
      m          <= '0;
      bi         <= '0;
      bj         <= '0;
      g          <= '0;
      i          <= '0;
      k          <= '0;
      pre_s      <= '0;
      chain_next <= 1'b0;
      rd_act     <= 1'b0;
      rd_bi      <= '0;
      rd_bj      <= '0;
      rd_g       <= '0;
      rd_row     <= '0;
      rd_slot    <= '0;
      fin_cnt    <= '0;
      skel_q     <= '0;
      done       <= 1'b0;
    end else begin
      skel_q <= skel;
      done   <= 1'b0;

      // read-out counter (a new group end below takes precedence)
      if (rd_act) begin
        if (rd_slot != idx_t'(R-1)) rd_slot <= rd_slot + 1'b1;
        else begin
          rd_slot <= '0;
          if (rd_row != idx_t'(B-1)) rd_row <= rd_row + 1'b1;
          else rd_act <= 1'b0;
        end
      end

      unique case (mode)
        M_IDLE: if (start) begin
          m       <= idx_t'(NB - 1) - kk;
          bi      <= '0;
          bj      <= '0;
          g       <= '0;
          fin_cnt <= idx_t'(R + 3);
          mode    <= (kk == idx_t'(NB - 1)) ? M_FIN : M_WAITRDY;
        end
        M_WAITRDY: if (cur_ready) begin
          mode  <= M_PRE;
          pre_s <= '0;
        end
        M_PRE: begin
          if (pre_s != idx_t'(R-1)) pre_s <= pre_s + 1'b1;
          else begin
            mode <= M_RUN;
            i    <= '0;
            k    <= '0;
          end
        end
        M_RUN: begin
          if (i == '0 && k == idx_t'(B-1) && last_group) chain_next <= next_ready;
          if (i != idx_t'(B-1)) i <= i + 1'b1;
          else begin
            i <= '0;
            if (k != idx_t'(B-1)) k <= k + 1'b1;
            else k <= '0;
          end
          if (group_end) begin
            rd_act  <= 1'b1;
            rd_bi   <= bi;
            rd_bj   <= bj;
            rd_g    <= g;
            rd_row  <= '0;
            rd_slot <= '0;
            if (!last_group) g <= g + 1'b1;
            else begin
              g <= '0;
              if (last_op) mode <= M_FIN;
              else begin
                bi <= nbi;
                bj <= nbj;
                if (!chain_now) mode <= M_WAITRDY;
              end
            end
          end
        end
        M_FIN: begin
          if (!rd_act) begin
            if (fin_cnt == '0) begin
              mode <= M_IDLE;
              done <= 1'b1;
            end else fin_cnt <= fin_cnt - 1'b1;
          end
        end
        default: mode <= M_IDLE;
      endcase
    end
  end

  // token into the array: skeleton of last cycle plus the data read for it
  always_comb begin
    tok   = skel_q;
    tok.c = rdata_c;
    tok.d = rdata_d;
    tok.f = rdata_f;
  end

  assign busy   = mode != M_IDLE;
  assign mms_en = busy;

  assign we    = res_tok.valid && res_tok.res_valid;
  assign waddr = res_tok.wb_addr;
  assign wdata = res_tok.res;

  assign ev_pre          = mode == M_PRE;
  assign ev_chain        = mode == M_RUN && group_end && last_group && chain_now;
  assign ev_idle_readout = rd_act && mode != M_RUN && mode != M_PRE;

endmodule
