// dqn_controller: the RL topology selector of one subNoC.
//
// A deep Q-network with 12 inputs (the state vector), two hidden layers of
// 15 ReLU neurons and 4 outputs, the Q-values of mesh, cmesh, torus and tree.
// The network is trained off-line; only its weights live here, written
// through the w_we/w_addr/w_data port. Inference uses a single multiplier
// and a single adder: one multiply-accumulate per cycle, neuron by neuron.
//
// Weight memory (Q8.8 two's complement), neuron after neuron, each neuron
// stored as its bias followed by its input weights:
//   layer 1: 15 neurons x (1+12) words at 0..194
//   layer 2: 15 neurons x (1+15) words at 195..434
//   output :  4 neurons x (1+15) words at 435..498
// A neuron takes 1 cycle to load its bias plus one cycle per input, so
// inference takes 499 cycles, then 4 cycles pick the largest Q-value (lowest
// index on ties) and one cycle applies epsilon-greedy exploration: with
// probability EPS/65536 (0.05 by default) a pseudo-random topology from a
// 16-bit LFSR replaces the greedy one. action_valid is high in the
// 504th cycle after the one in which start is seen. Products are kept at full precision (Q16.16) in the accumulator;
// layer outputs are saturated back to Q8.8.
// Layer sizes, ReLU, the one-adder-one-multiplier datapath, off-line
// weights and the 0.05 exploration rate follow the design; the fixed-point
// format and memory layout are this implementation's.
module dqn_controller #(
  parameter int          N_IN  = 12,
  parameter int          N_HID = 15,
  parameter int          N_OUT = 4,
  parameter logic [15:0] EPS   = 16'd3277
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               w_we,
  input  logic [8:0]         w_addr,
  input  logic signed [15:0] w_data,
  input  logic               start,
  input  logic [15:0]        state_vec [N_IN],
  output logic               busy,
  output logic               action_valid,
  output logic [1:0]         action,
  output logic               explored,
  output logic signed [15:0] q_out [N_OUT]
);
  localparam int L1_BASE = 0;
  localparam int L2_BASE = N_HID * (1 + N_IN);
  localparam int L3_BASE = L2_BASE + N_HID * (1 + N_HID);
  localparam int NW      = L3_BASE + N_OUT * (1 + N_HID);

  logic signed [15:0] wmem [NW];
  logic signed [15:0] xin  [N_IN];
  logic signed [15:0] h1   [N_HID];
  logic signed [15:0] h2   [N_HID];
  logic signed [15:0] q    [N_OUT];

  typedef enum logic [2:0] {IDLE, MAC, ARGMAX, EXPLORE} st_e;
  st_e st;
  logic [1:0]  layer;
  logic [4:0]  neu;
  logic [4:0]  inp;      // 0 = bias cycle, k = input k-1
  logic [8:0]  addr;
  logic signed [39:0] acc;
  logic [15:0] lfsr;
  logic [1:0]  best;
  logic [2:0]  am_i;

  always_ff @(posedge clk) if (w_we && int'(w_addr) < NW) wmem[w_addr] <= w_data;

  function automatic logic signed [15:0] sat16(input logic signed [39:0] v, input logic relu);
    logic signed [39:0] s;
    s = v >>> 8;                       // Q16.16 -> Q8.8
    if (relu && s < 0)            return 16'sd0;
    if (s > 40'sd32767)           return 16'sd32767;
    if (s < -40'sd32768)          return -16'sd32768;
    return s[15:0];
  endfunction

  logic [4:0] n_in_cur, n_out_cur;
  logic signed [15:0] xsel;
  always_comb begin
    n_in_cur  = (layer == 0) ? 5'(N_IN) : 5'(N_HID);
    n_out_cur = (layer == 2) ? 5'(N_OUT) : 5'(N_HID);
    xsel = '0;
    if (inp != 0) begin
      case (layer)
        2'd0:    xsel = xin[inp - 1'b1];
        2'd1:    xsel = h1[inp - 1'b1];
        default: xsel = h2[inp - 1'b1];
      endcase
    end
  end

  // the single multiplier and the single adder
  logic signed [31:0] prod;
  logic signed [39:0] sum;
  logic signed [15:0] wcur;
  assign wcur = wmem[addr];
  assign prod = wcur * xsel;
  assign sum  = (inp == 0) ? (40'(wcur) <<< 8) : acc + 40'(prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; layer <= '0; neu <= '0; inp <= '0; addr <= '0; acc <= '0;
      lfsr <= 16'hACE1; best <= '0; am_i <= '0;
      action_valid <= 1'b0; action <= '0; explored <= 1'b0;
      for (int i = 0; i < N_IN; i++)  xin[i] <= '0;
      for (int i = 0; i < N_HID; i++) begin h1[i] <= '0; h2[i] <= '0; end
      for (int i = 0; i < N_OUT; i++) q[i] <= '0;
    end else begin
      action_valid <= 1'b0;
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      case (st)
        IDLE: if (start) begin
          for (int i = 0; i < N_IN; i++) xin[i] <= state_vec[i];
          st <= MAC; layer <= '0; neu <= '0; inp <= '0; addr <= 9'(L1_BASE);
        end
        MAC: begin
          acc  <= sum;
          addr <= addr + 1'b1;
          if (inp == n_in_cur) begin
            inp <= '0;
            case (layer)
              2'd0:    h1[neu] <= sat16(sum, 1'b1);
              2'd1:    h2[neu] <= sat16(sum, 1'b1);
              default: q[neu[1:0]] <= sat16(sum, 1'b0);
            endcase
            if (neu == n_out_cur - 1'b1) begin
              neu <= '0;
              if (layer == 2'd2) begin
                st <= ARGMAX; best <= '0; am_i <= 3'd1;
              end else begin
                layer <= layer + 1'b1;
              end
            end else begin
              neu <= neu + 1'b1;
            end
          end else begin
            inp <= inp + 1'b1;
          end
        end
        ARGMAX: begin
          if (q[am_i[1:0]] > q[best]) best <= am_i[1:0];
          if (int'(am_i) == N_OUT - 1) st <= EXPLORE;
          am_i <= am_i + 1'b1;
        end
        EXPLORE: begin
          explored     <= (lfsr < EPS);
          action       <= (lfsr < EPS) ? lfsr[9:8] : best;
          action_valid <= 1'b1;
          st           <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);
  always_comb for (int i = 0; i < N_OUT; i++) q_out[i] = q[i];
endmodule
