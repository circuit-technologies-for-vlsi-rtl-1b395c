// dp_network: delay-line array network of the DP matching processor.
//
// The network has (N+1) x (N+1) nodes for the match of an N-element input
// vector X against an N-element template T. Node (i, j) is reached from
// node (i, j-1) by a horizontal line, from node (i-1, j) by a vertical line
// and from node (i-1, j-1) by a diagonal line. Each node is an OR gate: it
// rises with the first of its inputs, so the step that reaches node (i, j)
// first has taken the path of least accumulated delay, and the arrival time
// at node (N, N) solves the recurrence
//     D(i,j) = min(D(i,j-1) + H, D(i-1,j-1) + diag(i,j), D(i-1,j) + V).
//
// Diagonal lines have DIAG_N (32) domino elements. In the delay-setting
// phase (enable = 1) each is cleared to all-unfired and its PHI receives the
// AND of the pulses of T[i] and X[j]; the unfired elements left afterwards,
// DIAG_N - max(0, w - |T[i] - X[j]|), are its delay. Horizontal and vertical
// lines have HV_N (16) elements and are preset during the clear to one
// constant skip penalty. In the matching phase (enable = 0) each line's PHI
// is its source node, and the step is applied to node (0, 0).
//
// Line outputs are gated with the matching phase so that no node rises
// during delay setting. Ports: clr (start of the setting phase), enable,
// pulse_x / pulse_t from the element-to-pulse converters, skip_pen, step,
// goal (node (N, N)), and diag_delay, the programmed diagonal delays.
module dp_network #(
  parameter int unsigned N      = 16,
  parameter int unsigned DIAG_N = 32,
  parameter int unsigned HV_N   = 16,
  parameter int unsigned PEN_W  = 4,
  parameter int unsigned DPW    = $clog2(DIAG_N + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       enable,
  input  logic [N-1:0]               pulse_x,
  input  logic [N-1:0]               pulse_t,
  input  logic [PEN_W-1:0]           skip_pen,
  input  logic                       step,
  output logic                       goal,
  output logic [N-1:0][N-1:0][DPW-1:0] diag_delay
);

  localparam int unsigned HPW = $clog2(HV_N + 1);

  // g_row[i].g_col[j] holds node (i, j) and the three lines leaving it
  for (genvar i = 0; i <= N; i++) begin : g_row
    for (genvar j = 0; j <= N; j++) begin : g_col
      logic node;
      logic d_out, h_out, v_out;   // outputs of lines leaving this node

      if (i == 0 && j == 0) begin : g_start
        assign node = step;
      end else begin : g_or
        logic d_in, h_in, v_in;    // line outputs arriving at this node
        if (i > 0 && j > 0) begin : g_d
          assign d_in = g_row[i-1].g_col[j-1].d_out;
        end else begin : g_nd
          assign d_in = 1'b0;
        end
        if (j > 0) begin : g_h
          assign h_in = g_row[i].g_col[j-1].h_out;
        end else begin : g_nh
          assign h_in = 1'b0;
        end
        if (i > 0) begin : g_v
          assign v_in = g_row[i-1].g_col[j].v_out;
        end else begin : g_nv
          assign v_in = 1'b0;
        end
        assign node = d_in | h_in | v_in;
      end

      // diagonal line to (i+1, j+1), programmed by T[i] and X[j]
      if (i < N && j < N) begin : g_diag
        logic phi, raw;
        logic [DPW-1:0] rem;
        assign phi = enable ? (pulse_t[i] & pulse_x[j]) : node;
        prog_delay_line #(.N(DIAG_N)) u_line (
          .clk, .rst_n, .clr,
          .preset    (DPW'(DIAG_N)),
          .phi       (phi),
          .out       (raw),
          .remaining (rem)
        );
        assign d_out = raw & ~enable;
        assign diag_delay[i][j] = rem;
      end else begin : g_nodiag
        assign d_out = 1'b0;
      end

      // horizontal line to (i, j+1)
      if (j < N) begin : g_hl
        logic raw;
        logic [HPW-1:0] rem;
        prog_delay_line #(.N(HV_N)) u_line (
          .clk, .rst_n, .clr,
          .preset    (HPW'(skip_pen)),
          .phi       (node & ~enable),
          .out       (raw),
          .remaining (rem)
        );
        assign h_out = raw & ~enable;
      end else begin : g_nohl
        assign h_out = 1'b0;
      end

      // vertical line to (i+1, j)
      if (i < N) begin : g_vl
        logic raw;
        logic [HPW-1:0] rem;
        prog_delay_line #(.N(HV_N)) u_line (
          .clk, .rst_n, .clr,
          .preset    (HPW'(skip_pen)),
          .phi       (node & ~enable),
          .out       (raw),
          .remaining (rem)
        );
        assign v_out = raw & ~enable;
      end else begin : g_novl
        assign v_out = 1'b0;
      end
    end
  end

  assign goal = g_row[N].g_col[N].node;

endmodule
