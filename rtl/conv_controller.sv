// Controller block of the convolutional unit: the integrate-and-fire engine
// of the neuron (pixel) array.
//
// After reset it sweeps the neuron and rate-saturation memories once to clear
// them (INIT), then waits in IDLE. For each event popped from the input FIFO
// it walks the event's kernel (k = event kernel ID) element by element, one
// neuron per clock (CONV): the address calculation block names the neuron,
// the weight is added (positive event) or subtracted (negative event), and
// the new potential is compared with the positive and negative thresholds.
// A neuron that reaches a threshold is reset to 0; it emits an output event
// (sub-sampled address, polarity of the threshold crossed; header fields 0,
// the router fills them in) into the output
// FIFO only if its refractory period since its last output spike has passed
// (rate saturation). When the leakage counter requests it, a LEAK sweep moves
// every potential towards 0 by the leakage amplitude; leakage takes priority
// over a waiting event. An event whose kernel ID is out of range or whose
// kernel has size 0 is consumed without effect.
//
// Timing: an event with an R x C kernel occupies the controller for 1 + R*C
// clocks (one to pop it, one per kernel element), so back-to-back events with
// 1x1 kernels are taken every 2 clocks and with 5x5 kernels every 26; a leak
// sweep and the initial clear take NROWS*NCOLS clocks each.
//
// The document gives the functions (convolution per event, two thresholds,
// rate saturation, global leakage towards the reset value); the one-neuron-
// per-clock schedule, the reset value 0 and the sign convention for polarity
// are this design's.
module conv_controller #(
  parameter int unsigned NROWS     = 28,
  parameter int unsigned NCOLS     = 28,
  parameter int unsigned N_KERNELS = 8,
  parameter int unsigned KMAX      = 5,
  parameter int unsigned POT_W     = 16,
  parameter int unsigned TS_W      = 16,
  localparam int unsigned N_NEURONS = NROWS * NCOLS,
  localparam int unsigned AW        = $clog2(N_NEURONS),
  localparam int unsigned WA_W      = $clog2(N_KERNELS * KMAX * KMAX),
  localparam int unsigned KA_W      = (N_KERNELS > 1) ? $clog2(N_KERNELS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // input FIFO
  input  snn_pkg::event_t         in_ev,
  input  logic                    in_empty,
  output logic                    in_pop,
  // parameters
  input  snn_pkg::neuron_par_t    np,
  // kernel memory
  output logic [KA_W-1:0]         k_kid,
  input  logic [7:0]              k_size,
  input  logic [7:0]              k_shift,
  output logic [WA_W-1:0]         k_waddr,
  input  logic signed [7:0]       k_weight,
  // neuron memory
  output logic [AW-1:0]           n_rd_addr,
  input  logic signed [POT_W-1:0] n_rd_data,
  output logic                    n_wr_en,
  output logic [AW-1:0]           n_wr_addr,
  output logic signed [POT_W-1:0] n_wr_data,
  // rate-saturation memory
  output logic [AW-1:0]           r_rd_addr,
  input  logic                    r_rd_valid,
  input  logic [TS_W-1:0]         r_rd_ts,
  output logic                    r_wr_en,
  output logic [AW-1:0]           r_wr_addr,
  output logic                    r_wr_valid,
  output logic [TS_W-1:0]         r_wr_ts,
  // leakage counter
  input  logic                    leak_req,
  output logic                    leak_ack,
  input  logic [TS_W-1:0]         now,
  // output FIFO
  output logic                    out_wr,
  output snn_pkg::event_t         out_ev,
  // status pulses
  output logic                    st_fire,      // threshold reached
  output logic                    st_suppress,  // spike held back by rate saturation
  output logic                    busy
);
  import snn_pkg::*;

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_CONV, S_LEAK} state_e;
  state_e state;

  event_t        cur;
  logic [3:0]    ki, kj;
  logic [AW-1:0] cnt;

  logic [3:0] rows_eff, cols_eff;
  logic       ac_in_range;
  logic [AW-1:0] ac_naddr;
  logic [4:0] ac_nrow, ac_ncol, ac_out_x, ac_out_y;

  logic signed [POT_W-1:0] w_ext, v_new, v_leak, amp_ext;
  logic fire_pos, fire_neg, allowed;

  assign k_kid   = cur.kid[KA_W-1:0];
  assign rows_eff = (k_size[7:4] > 4'(KMAX)) ? 4'(KMAX) : k_size[7:4];
  assign cols_eff = (k_size[3:0] > 4'(KMAX)) ? 4'(KMAX) : k_size[3:0];
  assign k_waddr = WA_W'(k_kid * (KMAX * KMAX) + ki * KMAX + kj);

  addr_calc #(.NROWS(NROWS), .NCOLS(NCOLS)) u_addr (
    .ev_x(cur.x), .ev_y(cur.y), .ki(ki), .kj(kj),
    .shift_row(k_shift[7:4]), .shift_col(k_shift[3:0]),
    .map_rows(np.map_rows), .map_cols(np.map_cols), .subsample(np.subsample[2:0]),
    .in_range(ac_in_range), .naddr(ac_naddr), .nrow(ac_nrow), .ncol(ac_ncol),
    .out_x(ac_out_x), .out_y(ac_out_y));

  always_comb begin
    w_ext   = POT_W'(k_weight);
    amp_ext = POT_W'({1'b0, np.leak_amp});
    v_new   = cur.pol ? n_rd_data + w_ext : n_rd_data - w_ext;
    fire_pos = v_new >= $signed({{(POT_W-8){1'b0}}, np.pos_thr});
    fire_neg = !fire_pos && (v_new <= -$signed({{(POT_W-8){1'b0}}, np.neg_thr}));
    allowed  = !r_rd_valid || ((now - r_rd_ts) >= TS_W'(np.refract));
    if (n_rd_data > amp_ext)        v_leak = n_rd_data - amp_ext;
    else if (n_rd_data < -amp_ext)  v_leak = n_rd_data + amp_ext;
    else                            v_leak = '0;
  end

  always_comb begin
    n_rd_addr   = (state == S_CONV) ? ac_naddr : cnt;
    r_rd_addr   = n_rd_addr;
    n_wr_en     = 1'b0;
    n_wr_addr   = n_rd_addr;
    n_wr_data   = '0;
    r_wr_en     = 1'b0;
    r_wr_addr   = n_rd_addr;
    r_wr_valid  = 1'b0;
    r_wr_ts     = now;
    out_wr      = 1'b0;
    out_ev      = '{dst_row: '0, dst_col: '0, kid: '0, x: ac_out_x, y: ac_out_y, pol: fire_pos};
    st_fire     = 1'b0;
    st_suppress = 1'b0;
    in_pop      = 1'b0;
    leak_ack    = 1'b0;
    unique case (state)
      S_INIT: begin
        n_wr_en = 1'b1;
        r_wr_en = 1'b1;
      end
      S_IDLE: begin
        leak_ack = leak_req;
        in_pop   = !leak_req && !in_empty;
      end
      S_CONV: begin
        if (rows_eff != 0 && cols_eff != 0 && ac_in_range) begin
          n_wr_en = 1'b1;
          if (fire_pos || fire_neg) begin
            n_wr_data = '0;
            st_fire   = 1'b1;
            if (allowed) begin
              out_wr     = 1'b1;
              r_wr_en    = 1'b1;
              r_wr_valid = 1'b1;
            end else begin
              st_suppress = 1'b1;
            end
          end else begin
            n_wr_data = v_new;
          end
        end
      end
      S_LEAK: begin
        n_wr_en   = 1'b1;
        n_wr_data = v_leak;
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE) || !in_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT;
      cur   <= '0;
      ki    <= '0;
      kj    <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_INIT, S_LEAK: begin
          if (cnt == AW'(N_NEURONS - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_IDLE: begin
          if (leak_req) begin
            cnt   <= '0;
            state <= S_LEAK;
          end else if (!in_empty) begin
            cur <= in_ev;
            ki  <= '0;
            kj  <= '0;
            if (in_ev.kid < KID_W'(N_KERNELS)) state <= S_CONV;
          end
        end
        S_CONV: begin
          if (rows_eff == 0 || cols_eff == 0) begin
            state <= S_IDLE;
          end else if (kj + 1'b1 < cols_eff) begin
            kj <= kj + 1'b1;
          end else begin
            kj <= '0;
            if (ki + 1'b1 < rows_eff) ki <= ki + 1'b1;
            else                      state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
