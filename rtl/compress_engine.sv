// compress_engine: loop controller of the "compress" kernel over one memory port.
//
// The kernel walks a k x k array with two nested loops, i and j from 1 to k-1, and in
// every iteration replaces a[i][j] by a[i][j] - (2*a[i-1][j-1] + a[i-1][j] + a[i][j-1]).
// The engine issues the memory accesses of each iteration in program order, one per
// cycle, as symbolic addresses (y, x) = (row index, column index of the array); the
// physical layout is left to the address generator behind it.
//
// Without the reuse layer (mh_en = 0) an iteration makes five accesses:
//   read a[i-1][j-1], read a[i-1][j], read a[i][j-1], read a[i][j], write a[i][j].
// With the reuse layer (mh_en = 1) every iteration but the first of a row takes
// a[i-1][j-1] and a[i][j-1] from the two registers of reuse_buffer and makes three:
//   read a[i-1][j], read a[i][j], write a[i][j].
// The order of the three remaining accesses is an own choice (program order kept).
//
// Interface: start (one-cycle pulse while idle) latches k_size and mh_en and starts a
// run; busy is high during it and done pulses for one cycle at its end. The memory port
// (mem_en, mem_we, mem_y, mem_x, mem_wdata) expects reads to return on mem_rdata one
// cycle after they are issued. accesses, iterations and reuse_hits count, for the last
// run, the memory accesses, the inner iterations and the iterations served by the reuse
// registers. Timing: 5 cycles per iteration without reuse; with reuse 5 cycles for the
// first iteration of each row and 3 for the others, so a run takes
// (k-1)*(k-1)*5 or (k-1)*(5 + 3*(k-2)) cycles, plus one cycle to start.
module compress_engine
  import layout_pkg::*;
#(
  parameter  int K_MAX = 1000,
  parameter  int W     = 16,
  localparam int KS_W  = $clog2(K_MAX + 1),
  localparam int IX_W  = idx_w(K_MAX)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            mh_en,
  input  logic [KS_W-1:0] k_size,
  output logic            busy,
  output logic            done,
  // memory port, symbolic addresses
  output logic            mem_en,
  output logic            mem_we,
  output logic [IX_W-1:0] mem_y,
  output logic [IX_W-1:0] mem_x,
  output logic [W-1:0]    mem_wdata,
  input  logic [W-1:0]    mem_rdata,
  // statistics of the last run
  output logic [31:0]     accesses,
  output logic [31:0]     iterations,
  output logic [31:0]     reuse_hits
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_RD_UL,
    S_RD_U,
    S_RD_L,
    S_RD_C,
    S_WR
  } state_e;

  state_e          state;
  logic [IX_W-1:0] i, j;
  logic [KS_W-1:0] k_q;
  logic            mh_q;
  logic            use_reg;         // this iteration takes ul and l from reuse_buffer
  logic [W-1:0]    ul_q, u_q, l_q;

  logic [W-1:0]    rb_ul, rb_l;
  logic            rb_valid;
  logic            rb_flush, rb_capture;

  logic [W-1:0]    op_ul, op_l, result;
  logic            last_j, last_i;

  assign op_ul  = use_reg ? rb_ul : ul_q;
  assign op_l   = use_reg ? rb_l  : l_q;
  assign last_j = (KS_W'(j) == k_q - 1'b1);
  assign last_i = (KS_W'(i) == k_q - 1'b1);

  compress_datapath #(.W(W)) u_dp (
    .ul    (op_ul),
    .u     (u_q),
    .l     (op_l),
    .c     (mem_rdata),
    .pred  (),
    .result(result)
  );

  reuse_buffer #(.W(W)) u_reuse (
    .clk    (clk),
    .rst_n  (rst_n),
    .flush  (rb_flush),
    .capture(rb_capture),
    .up_in  (u_q),
    .left_in(result),
    .ul     (rb_ul),
    .l      (rb_l),
    .valid  (rb_valid)
  );

  // memory requests of the current state
  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_y     = i;
    mem_x     = j;
    mem_wdata = result;
    unique case (state)
      S_RD_UL: begin mem_en = 1'b1; mem_y = i - 1'b1; mem_x = j - 1'b1; end
      S_RD_U:  begin mem_en = 1'b1; mem_y = i - 1'b1; end
      S_RD_L:  begin mem_en = 1'b1; mem_x = j - 1'b1; end
      S_RD_C:  begin mem_en = 1'b1; end
      S_WR:    begin mem_en = 1'b1; mem_we = 1'b1; end
      default: ;
    endcase
  end

  assign busy       = (state != S_IDLE);
  assign rb_capture = (state == S_WR);
  assign rb_flush   = (state == S_IDLE) || (state == S_WR && last_j);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      i          <= '0;
      j          <= '0;
      k_q        <= '0;
      mh_q       <= 1'b0;
      use_reg    <= 1'b0;
      ul_q       <= '0;
      u_q        <= '0;
      l_q        <= '0;
      done       <= 1'b0;
      accesses   <= '0;
      iterations <= '0;
      reuse_hits <= '0;
    end else begin
      done <= 1'b0;
      if (mem_en) accesses <= accesses + 1;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            k_q        <= k_size;
            mh_q       <= mh_en;
            i          <= IX_W'(1);
            j          <= IX_W'(1);
            use_reg    <= 1'b0;
            accesses   <= '0;
            iterations <= '0;
            reuse_hits <= '0;
            if (k_size < 2) done  <= 1'b1;
            else            state <= S_RD_UL;
          end
        end
        S_RD_UL: state <= S_RD_U;
        S_RD_U: begin
          if (!use_reg) ul_q <= mem_rdata;
          state <= use_reg ? S_RD_C : S_RD_L;
        end
        S_RD_L: begin
          u_q   <= mem_rdata;
          state <= S_RD_C;
        end
        S_RD_C: begin
          if (use_reg) u_q <= mem_rdata;
          else         l_q <= mem_rdata;
          state <= S_WR;
        end
        S_WR: begin
          iterations <= iterations + 1;
          if (use_reg) reuse_hits <= reuse_hits + 1;
          if (last_j) begin
            j       <= IX_W'(1);
            i       <= i + 1'b1;
            use_reg <= 1'b0;
            if (last_i) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_RD_UL;
            end
          end else begin
            j       <= j + 1'b1;
            use_reg <= mh_q;
            state   <= mh_q ? S_RD_U : S_RD_UL;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // every access stays inside the k x k array
  a_in_array: assert property (@(posedge clk) disable iff (!rst_n)
    mem_en |-> (KS_W'(mem_y) < k_q) && (KS_W'(mem_x) < k_q));
  // the reuse registers are only used when they hold the previous iteration's words
  a_reuse_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WR && use_reg) |-> rb_valid);

endmodule
