// mesh_layout_top: compress kernel on a memory with a row-switching-aware data layout.
//
// A k x k array lives in a memory cell array of Q columns. Instead of the usual row major
// layout the array is cut into RECT_W x RECT_H rectangles (RECT_W*RECT_H = Q) and each
// rectangle is one memory row, so the 2x2 access window of the kernel stays in few rows
// and the power-hungry row select lines switch less often.
//
//   compress_engine --(y,x)--+--> tile_addr_gen --(row,col)--> mem_cell_array
//   host port -------(y,x)---+                     |
//                                                  +--> row_transition_counter (rtc)
//   engine accesses or trace port --(y,x)--> layout_shape_search (all m x n = Q shapes)
//
// compress_engine runs the kernel with or without its two-register reuse layer (mh_en).
// The row transition counter measures the switching of the real memory during a run.
// The shape search replays the same symbolic accesses on every candidate shape of a
// Q-column memory and reports the count of each and the best one; when no run is active
// it can instead be fed an arbitrary symbolic access sequence through the trace port.
// The shape built into the address generator (RECT_W x RECT_H, default 8 x 4, the
// winner for the compress kernel on a 32-column memory) is a parameter, as is the
// choice among the four row/column major tile orders (default: rectangles row major,
// elements column major).
//
// Interface and timing:
//  - host_*: load and read back the array by symbolic address while busy is low. Reads
//    return on host_rdata one cycle later. Host accesses are not counted.
//  - start (pulse, while idle) with k_size and mh_en starts a run; done pulses at the end.
//    k_size also sets the layout of the host port and must stay fixed while the array is
//    in use.
//  - rtc, accesses, iterations, reuse_hits describe the last run; they reset at start.
//  - search_clear clears the shape search; start clears it too. trace_valid with
//    trace_y/trace_x feeds it one access per cycle while idle.
// Own choices: word width W = 16, one rectangle per row also for peripheral rectangles,
// K_MAX = 1000 (largest array side evaluated), host/trace ports.
module mesh_layout_top
  import layout_pkg::*;
#(
  parameter  int     K_MAX      = 1000,
  parameter  int     Q          = 32,
  parameter  int     W          = 16,
  parameter  int     RECT_W     = 8,
  parameter  int     RECT_H     = 4,
  parameter  order_e RECT_ORDER = ORDER_ROW_MAJOR,
  parameter  order_e ELEM_ORDER = ORDER_COL_MAJOR,
  parameter  int     P          = rows_needed(K_MAX, RECT_W, RECT_H),
  localparam int     KS_W       = $clog2(K_MAX + 1),
  localparam int     IX_W       = idx_w(K_MAX),
  localparam int     ROW_W      = idx_w(P),
  localparam int     COL_W      = idx_w(Q),
  localparam int     NS         = num_shapes(Q),
  localparam int     SH_W       = $clog2(Q + 1),
  localparam int     SI_W       = idx_w(NS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // run control
  input  logic            start,
  input  logic            mh_en,
  input  logic [KS_W-1:0] k_size,
  output logic            busy,
  output logic            done,
  // host access to the array, symbolic addresses
  input  logic            host_en,
  input  logic            host_we,
  input  logic [IX_W-1:0] host_y,
  input  logic [IX_W-1:0] host_x,
  input  logic [W-1:0]    host_wdata,
  output logic [W-1:0]    host_rdata,
  // external symbolic access sequence for the shape search
  input  logic            search_clear,
  input  logic            trace_valid,
  input  logic [IX_W-1:0] trace_y,
  input  logic [IX_W-1:0] trace_x,
  // results
  output logic [31:0]     rtc,
  output logic [31:0]     accesses,
  output logic [31:0]     iterations,
  output logic [31:0]     reuse_hits,
  output logic [31:0]     cand_rtc [NS],
  output logic [SH_W-1:0] cand_w   [NS],
  output logic [SH_W-1:0] cand_h   [NS],
  output logic [SI_W-1:0] best_idx,
  output logic [SH_W-1:0] best_w,
  output logic [SH_W-1:0] best_h,
  output logic [31:0]     best_rtc
);

  // engine memory port
  logic            e_en, e_we;
  logic [IX_W-1:0] e_y, e_x;
  logic [W-1:0]    e_wdata, rdata;
  logic            run_start;

  // shared memory port after arbitration
  logic            m_en, m_we;
  logic [IX_W-1:0] m_y, m_x;
  logic [W-1:0]    m_wdata;
  logic [ROW_W-1:0] m_row;
  logic [COL_W-1:0] m_col;

  // shape search input
  logic            s_access;
  logic [IX_W-1:0] s_y, s_x;

  assign run_start = start && !busy;

  compress_engine #(
    .K_MAX(K_MAX),
    .W    (W)
  ) u_engine (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .mh_en     (mh_en),
    .k_size    (k_size),
    .busy      (busy),
    .done      (done),
    .mem_en    (e_en),
    .mem_we    (e_we),
    .mem_y     (e_y),
    .mem_x     (e_x),
    .mem_wdata (e_wdata),
    .mem_rdata (rdata),
    .accesses  (accesses),
    .iterations(iterations),
    .reuse_hits(reuse_hits)
  );

  always_comb begin
    if (busy) begin
      m_en = e_en;    m_we = e_we;    m_y = e_y;    m_x = e_x;    m_wdata = e_wdata;
    end else begin
      m_en = host_en; m_we = host_we; m_y = host_y; m_x = host_x; m_wdata = host_wdata;
    end
  end

  tile_addr_gen #(
    .K_MAX     (K_MAX),
    .Q         (Q),
    .RECT_W    (RECT_W),
    .RECT_H    (RECT_H),
    .RECT_ORDER(RECT_ORDER),
    .ELEM_ORDER(ELEM_ORDER),
    .P         (P)
  ) u_agen (
    .k_size  (k_size),
    .y       (m_y),
    .x       (m_x),
    .row     (m_row),
    .col     (m_col),
    .addr    (),
    .in_range()
  );

  mem_cell_array #(
    .P(P),
    .Q(Q),
    .W(W)
  ) u_mem (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (m_en),
    .we        (m_we),
    .row       (m_row),
    .col       (m_col),
    .wdata     (m_wdata),
    .rdata     (rdata),
    .active_row()
  );

  assign host_rdata = rdata;

  row_transition_counter #(
    .ROW_W(ROW_W),
    .CNT_W(32)
  ) u_rtc (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (run_start),
    .access    (busy && e_en),
    .row       (m_row),
    .row_switch(),
    .count     (rtc)
  );

  always_comb begin
    if (busy) begin
      s_access = e_en; s_y = e_y;     s_x = e_x;
    end else begin
      s_access = trace_valid; s_y = trace_y; s_x = trace_x;
    end
  end

  layout_shape_search #(
    .K_MAX(K_MAX),
    .Q    (Q),
    .CNT_W(32)
  ) u_search (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (search_clear || run_start),
    .access  (s_access),
    .k_size  (k_size),
    .y       (s_y),
    .x       (s_x),
    .rtc     (cand_rtc),
    .shape_w (cand_w),
    .shape_h (cand_h),
    .best_idx(best_idx),
    .best_w  (best_w),
    .best_h  (best_h),
    .best_rtc(best_rtc)
  );

  // the host may only use the memory while no run is active
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n) host_en |-> !busy);

endmodule
