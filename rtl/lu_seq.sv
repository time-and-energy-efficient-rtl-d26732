// Sequencer of the LU array for one iteration of block LU decomposition.
//
// For iteration kk of an n x n matrix with block size b (m = n/b - 1 - kk
// blocks remain below and right of the diagonal block) it streams elements
// from the memory bank into the LU array, one per cycle and without gaps:
//   opLU on the diagonal block A(kk,kk)                      -> L11, U11
//   opL  on A(kk+1, kk), opU on A(kk, kk+1)                  -> L21(0), U12(0)
//   opL  on the remaining blocks below, A(kk+1+i, kk)        -> L21(i)
//   opU  on the remaining blocks to the right, A(kk, kk+1+j) -> U12(j)
// opU blocks are fed transposed (element (x,y) of the stream is A12(y,x)).
// Doing L21(0) and U12(0) first lets the first opMMS start after 3 b^2
// cycles, as in the design's overlapped schedule; ending with the opU blocks
// matches the column-by-column order in which the MMS sequencer consumes them.
//
// Results leave the array in issue order, b^2 per block, and are written back
// in place. blocks_done counts completed blocks (opLU = 1, then one per opL or
// opU block in the order above) so that the MMS sequencer can start a product
// as soon as its two operand blocks are in memory.
//
// Interface: start (one cycle) with kk; done (one cycle) when all results of
// the iteration are written. Memory: one read port (address now, data next
// cycle), one write port. lu_en disables the LU array while it is idle.
module lu_seq
  import lu_pkg::*;
#(
  parameter int N = 256,
  parameter int B = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  idx_t    kk,
  output logic    done,
  output logic    busy,
  output idx_t    blocks_done,
  // memory bank
  output addr_t   raddr,
  input  word_t   rdata,
  output logic    we,
  output addr_t   waddr,
  output word_t   wdata,
  // LU array
  output logic    lu_en,
  output lu_tok_t a_tok,
  input  lu_tok_t res_tok
);

  localparam int NB = N / B;

  typedef enum logic [2:0] {S_IDLE, S_LU, S_L, S_U, S_DRAIN} state_e;

  state_e state;
  idx_t   x, y, blk, m;
  logic [31:0] issued, written;
  idx_t   res_x, res_y;   // position of the next result within its block
  idx_t   l_cnt, u_cnt;   // opL / opU blocks already written

  lu_tok_t tag_q;         // element being read; its data arrives next cycle

  function automatic addr_t at(int unsigned row, int unsigned col);
    return addr_t'(row * N + col);
  endfunction

  // ---------------------------------------------------------------- issue
  logic        issue;
  lu_op_e      issue_op;
  int unsigned base_d;

  always_comb begin
    base_d   = int'(kk) * B;
    issue    = 1'b0;
    issue_op = OP_LU;
    raddr    = '0;
    unique case (state)
      S_LU: begin
        issue = 1'b1;
        raddr = at(base_d + int'(x), base_d + int'(y));
      end
      S_L: begin
        issue = 1'b1; issue_op = OP_L;
        raddr = at(base_d + B * (int'(blk) + 1) + int'(x), base_d + int'(y));
      end
      S_U: begin
        issue = 1'b1; issue_op = OP_U;
        raddr = at(base_d + int'(y), base_d + B * (int'(blk) + 1) + int'(x));
      end
      default: ;
    endcase
  end

  // -------------------------------------------------------------- control
  logic blk_end;
  assign blk_end = (x == idx_t'(B-1)) && (y == idx_t'(B-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      x      <= '0;
      y      <= '0;
      blk    <= '0;
      m      <= '0;
      issued <= '0;
      tag_q  <= '0;
    end else begin
      tag_q <= '{valid: issue, op: issue_op, x: x, y: y, data: '0};
      if (issue) issued <= issued + 1;

      if (state == S_LU || state == S_L || state == S_U) begin
        if (y != idx_t'(B-1)) y <= y + 1'b1;
        else begin
          y <= '0;
          x <= (x != idx_t'(B-1)) ? x + 1'b1 : '0;
        end
      end

      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_LU;
          x      <= '0;
          y      <= '0;
          blk    <= '0;
          m      <= idx_t'(NB - 1) - kk;
          issued <= '0;
        end
        S_LU: if (blk_end) state <= (m == '0) ? S_DRAIN : S_L;
        S_L: if (blk_end) begin
          if (blk == '0)             state <= S_U;           // L21(0) -> U12(0)
          else if (blk + 1'b1 != m)  blk   <= blk + 1'b1;
          else begin                                          // last L -> U12(1)
            state <= S_U;
            blk   <= idx_t'(1);
          end
        end
        S_U: if (blk_end) begin
          if (blk == '0) begin                                // U12(0) -> L21(1)
            if (m == idx_t'(1)) state <= S_DRAIN;
            else begin
              state <= S_L;
              blk   <= idx_t'(1);
            end
          end else if (blk + 1'b1 != m) blk <= blk + 1'b1;
          else state <= S_DRAIN;
        end
        S_DRAIN: if (written == issued) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign a_tok = tag_q.valid ? '{valid: 1'b1, op: tag_q.op, x: tag_q.x, y: tag_q.y, data: rdata} : '0;

  assign busy  = state != S_IDLE;
  assign lu_en = busy;

  // ------------------------------------------------------------ write-back
  int unsigned wr_row, wr_col;
  always_comb begin
    unique case (res_tok.op)
      OP_L: begin
        wr_row = base_d + B * (int'(l_cnt) + 1) + int'(res_tok.x);
        wr_col = base_d + int'(res_tok.y);
      end
      OP_U: begin
        wr_row = base_d + int'(res_tok.y);
        wr_col = base_d + B * (int'(u_cnt) + 1) + int'(res_tok.x);
      end
      default: begin
        wr_row = base_d + int'(res_tok.x);
        wr_col = base_d + int'(res_tok.y);
      end
    endcase
    we    = res_tok.valid;
    waddr = at(wr_row, wr_col);
    wdata = res_tok.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      written     <= '0;
      res_x       <= '0;
      res_y       <= '0;
      l_cnt       <= '0;
      u_cnt       <= '0;
      blocks_done <= '0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && state == S_IDLE) begin
        written     <= '0;
        res_x       <= '0;
        res_y       <= '0;
        l_cnt       <= '0;
        u_cnt       <= '0;
        blocks_done <= '0;
      end else if (we) begin
        written <= written + 1;
        if (res_y != idx_t'(B-1)) res_y <= res_y + 1'b1;
        else begin
          res_y <= '0;
          if (res_x != idx_t'(B-1)) res_x <= res_x + 1'b1;
          else begin
            res_x       <= '0;
            blocks_done <= blocks_done + 1'b1;
            if (res_tok.op == OP_L) l_cnt <= l_cnt + 1'b1;
            if (res_tok.op == OP_U) u_cnt <= u_cnt + 1'b1;
          end
        end
      end
      if (state == S_DRAIN && written == issued) done <= 1'b1;
    end
  end

  // results arrive in row-major order within each block
  a_result_order: assert property (@(posedge clk) disable iff (!rst_n)
                                   we |-> (res_tok.x == res_x && res_tok.y == res_y));

endmodule
