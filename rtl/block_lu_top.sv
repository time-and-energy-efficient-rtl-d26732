// Block LU decomposition engine (top level).
//
// Factors an N x N matrix held in the memory bank into L (unit lower
// triangular) and U (upper triangular), without pivoting, in place. The matrix
// is partitioned into B x B blocks and processed in N/B iterations. In
// iteration kk:
//   1. the LU array (B PEs) factors the diagonal block (opLU),
//   2. computes the L blocks under it (opL) and the U blocks right of it
//      (opU),
//   3. the MMS array (R PEs) updates every trailing block,
//      A22(i,j) <- A22(i,j) - L21(i) x U12(j)  (opMMS),
//      starting each update as soon as its two operand blocks are written, so
//      it overlaps with step 2.
// The next iteration starts when both arrays have finished. Each array is
// disabled (clock enable low) while it has no work, which with B = R is the
// LU array during most of every iteration.
//
// Host access: while busy is low the host reads (host_raddr -> host_rdata one
// cycle later) and writes (host_we/host_addr/host_wdata) the memory bank,
// element (row, col) at address row*N + col. A one-cycle start pulse begins
// the factorisation; done pulses for one cycle at the end and the bank then
// holds the strictly lower part of L and all of U.
//
// The activity outputs show which array is enabled and how the MMS array's
// pipeline is being used; they are not needed for operation.
//
// Defaults are the design's energy-optimal configuration: 16-bit data,
// b = r = 16, for the n = 256 problem its exploration centres on.
module block_lu_top
  import lu_pkg::*;
#(
  parameter int N = 256,
  parameter int B = 16,
  parameter int R = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  busy,
  output logic  done,
  input  logic  host_we,
  input  addr_t host_addr,
  input  word_t host_wdata,
  input  addr_t host_raddr,
  output word_t host_rdata,
  // activity, for observation (power management, profiling)
  output logic  lu_active,        // LU array enabled
  output logic  mms_active,       // MMS array enabled
  output logic  mms_preload,      // MMS array loading D before an operation
  output logic  mms_chain,        // an opMMS follows the previous one without a gap
  output logic  mms_idle_readout  // MMS results read out by idle tokens
);

  localparam int NB = N / B;

  // ------------------------------------------------------------ iteration
  typedef enum logic [1:0] {T_IDLE, T_START, T_RUN} top_state_e;

  top_state_e state;
  idx_t       kk;
  logic       lu_done_seen, mms_done_seen;
  logic       it_start;

  logic       lu_done, lu_busy, mms_done, mms_busy;
  idx_t       blocks_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= T_IDLE;
      kk            <= '0;
      lu_done_seen  <= 1'b0;
      mms_done_seen <= 1'b0;
      done          <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          kk    <= '0;
          state <= T_START;
        end
        T_START: begin
          lu_done_seen  <= 1'b0;
          mms_done_seen <= 1'b0;
          state         <= T_RUN;
        end
        T_RUN: begin
          if (lu_done)  lu_done_seen  <= 1'b1;
          if (mms_done) mms_done_seen <= 1'b1;
          if ((lu_done_seen || lu_done) && (mms_done_seen || mms_done)) begin
            if (kk == idx_t'(NB - 1)) begin
              state <= T_IDLE;
              done  <= 1'b1;
            end else begin
              kk    <= kk + 1'b1;
              state <= T_START;
            end
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assign it_start   = state == T_START;
  assign lu_active  = lu_busy;
  assign mms_active = mms_busy;
  assign busy     = state != T_IDLE;

  // ---------------------------------------------------------- memory bank
  addr_t raddr [4];
  word_t rdata [4];
  logic  we    [2];
  addr_t waddr [2];
  word_t wdata [2];

  addr_t lu_raddr, lu_waddr, mms_waddr;
  logic  lu_we, mms_we;
  word_t lu_wdata, mms_wdata;
  addr_t rc, rd, rf;

  always_comb begin
    raddr[0] = busy ? lu_raddr : host_raddr;
    raddr[1] = rc;
    raddr[2] = rd;
    raddr[3] = rf;
    we[0]    = busy ? lu_we    : host_we;
    waddr[0] = busy ? lu_waddr : host_addr;
    wdata[0] = busy ? lu_wdata : host_wdata;
    we[1]    = mms_we;
    waddr[1] = mms_waddr;
    wdata[1] = mms_wdata;
  end

  assign host_rdata = rdata[0];

  mem_bank #(.N(N), .NR(4), .NW(2)) u_mem (
    .clk   (clk),
    .raddr (raddr),
    .rdata (rdata),
    .we    (we),
    .waddr (waddr),
    .wdata (wdata)
  );

  // ------------------------------------------------------------- LU array
  logic    lu_en;
  lu_tok_t a_tok, lu_res;

  lu_seq #(.N(N), .B(B)) u_lu_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (it_start),
    .kk          (kk),
    .done        (lu_done),
    .busy        (lu_busy),
    .blocks_done (blocks_done),
    .raddr       (lu_raddr),
    .rdata       (rdata[0]),
    .we          (lu_we),
    .waddr       (lu_waddr),
    .wdata       (lu_wdata),
    .lu_en       (lu_en),
    .a_tok       (a_tok),
    .res_tok     (lu_res)
  );

  lu_array #(.B(B)) u_lu_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (lu_en),
    .a_in   (a_tok),
    .lu_out (lu_res)
  );

  // ------------------------------------------------------------ MMS array
  logic     mms_en;
  mms_tok_t m_tok, m_res;

  mms_seq #(.N(N), .B(B), .R(R)) u_mms_seq (
    .clk             (clk),
    .rst_n           (rst_n),
    .start           (it_start),
    .kk              (kk),
    .blocks_done     (blocks_done),
    .done            (mms_done),
    .busy            (mms_busy),
    .raddr_c         (rc),
    .raddr_d         (rd),
    .raddr_f         (rf),
    .rdata_c         (rdata[1]),
    .rdata_d         (rdata[2]),
    .rdata_f         (rdata[3]),
    .we              (mms_we),
    .waddr           (mms_waddr),
    .wdata           (mms_wdata),
    .mms_en          (mms_en),
    .tok             (m_tok),
    .res_tok         (m_res),
    .ev_pre          (mms_preload),
    .ev_chain        (mms_chain),
    .ev_idle_readout (mms_idle_readout)
  );

  mms_array #(.B(B), .R(R)) u_mms_array (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (mms_en),
    .t_in  (m_tok),
    .t_out (m_res)
  );

endmodule
