// array_control: SRAM address generation and data flow control.
//
// One frame produces z[t;r] for NB range blocks of N ranges at one output
// time t, integrating T steps per block; successive frames advance t by T
// (T is the decimation factor). A frame is issued as
//   PRE : N-1 cycles that only preload the first block's y pipeline,
//   RUN : NB blocks of T steps, back to back.
// For step c of block b the x-data address is t + c and the y-data address
// is t + D + b*N + (N-1) + c, where D is the range offset; the PRE cycles
// use the same rule with b = -1 and c = T-N+1 .. T-1. The host packs each
// y word at address a with y[a] as the current sample and y[a+N-T] as the
// preload sample; with this rule every word read carries both the sample
// of the running block and the one the other pipeline needs N-1 cycles
// before the next block starts, so a single address per cycle suffices.
//
// The SRAMs return data one cycle after the address, so the data flow
// controls are issued one cycle late, aligned with the data:
//   act / ysel : pipeline of the running block (block parity; B in PRE),
//   acc_clr    : first step of a block,
//   out_load   : the cycle after a block's last step (sums are complete),
//   frame_bit  : with out_load of block 0 of a frame,
//   out_valid  : the N cycles in which the array's last output register
//                holds a result of the block last loaded.
// T, NB and D are sampled at the start of each frame, so they can be
// changed while the array runs; T is held to 32..128 and NB to 1..96.
// `run` high starts a frame when idle and chains frames back to back.
//
// The two 15-bit address generators, the mux select lines, the frame
// indication bit and run-time control of range, delay and decimation are
// published; the address rule, the y word layout, the frame sequence and
// all handshakes are this design's choices.
module array_control
  import radar_pkg::*;
#(
  parameter int unsigned N    = NSLICE,    // slices (ranges per block)
  parameter int unsigned MAXB = NBLOCKS    // range blocks per frame, maximum
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic [TW-1:0] cfg_t,        // integration length T
  input  logic [7:0]    cfg_nblocks,  // range blocks per frame
  input  logic [AW-1:0] cfg_delay,    // range offset D, in samples
  // SRAM address generation (issue stage)
  output logic [AW-1:0] x_addr,
  output logic [AW-1:0] y_addr,
  // data flow control (aligned with SRAM read data)
  output logic          act,
  output logic          acc_clr,
  output logic          out_load,
  output logic          frame_bit,
  output logic          out_valid,
  // status
  output logic          in_preload,   // issue stage is in a PRE phase
  output logic          busy,
  output logic          frame_done,   // pulse: last step of a frame issued
  output logic [AW-1:0] t_frame       // output time t of the running frame
);

  localparam int unsigned BW = $clog2(MAXB + 1);
  localparam int unsigned VW = $clog2(N + 1);

  typedef enum logic [1:0] {IDLE, PRE, RUN} state_t;

  state_t        state;
  logic [TW-1:0] c, t_len;
  logic [BW-1:0] b, nb;
  logic [AW-1:0] t, d;
  logic [TW-1:0] t_new;
  logic [BW-1:0] nb_new;
  logic [AW-1:0] blk_off;
  logic          last_step, last_block;

  logic ex_act, ex_clr, ex_last, ex_b0, ld_b0;
  logic [VW-1:0] vcnt;

  // configuration as it will be latched at a frame start
  always_comb begin
    if (cfg_t < TW'(T_MIN))      t_new = TW'(T_MIN);
    else if (cfg_t > TW'(T_MAX)) t_new = TW'(T_MAX);
    else                         t_new = cfg_t;
    if (cfg_nblocks == 8'd0)            nb_new = BW'(1);
    else if (cfg_nblocks > 8'(MAXB))    nb_new = BW'(MAXB);
    else                                nb_new = BW'(cfg_nblocks);
  end

  assign last_step  = (c == t_len - TW'(1));
  assign last_block = (b == nb - BW'(1));

  // SRAM address generation
  always_comb begin
    blk_off = (state == PRE) ? AW'(-N) : AW'(b) * AW'(N);
    x_addr  = t + AW'(c);
    y_addr  = t + d + blk_off + AW'(N - 1) + AW'(c);
  end

  // issue-stage sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      c          <= '0;
      b          <= '0;
      t          <= '0;
      d          <= '0;
      t_len      <= TW'(T_MAX);
      nb         <= BW'(MAXB);
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        IDLE: if (run) begin
          t_len <= t_new;
          nb    <= nb_new;
          d     <= cfg_delay;
          c     <= t_new - TW'(N - 1);
          state <= PRE;
        end
        PRE: if (last_step) begin
          c     <= '0;
          b     <= '0;
          state <= RUN;
        end else begin
          c <= c + TW'(1);
        end
        RUN: if (last_step) begin
          c <= '0;
          if (last_block) begin
            t          <= t + AW'(t_len);
            frame_done <= 1'b1;
            if (run) begin
              t_len <= t_new;
              nb    <= nb_new;
              d     <= cfg_delay;
              c     <= t_new - TW'(N - 1);
              state <= PRE;
            end else begin
              state <= IDLE;
            end
          end else begin
            b <= b + BW'(1);
          end
        end else begin
          c <= c + TW'(1);
        end
        default: state <= IDLE;
      endcase
    end
  end

  // data flow control, one cycle behind the addresses
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_act   <= 1'b0;
      ex_clr   <= 1'b0;
      ex_last  <= 1'b0;
      ex_b0    <= 1'b0;
      out_load <= 1'b0;
      ld_b0    <= 1'b0;
      vcnt     <= '0;
    end else begin
      ex_act   <= (state == PRE) ? 1'b1 : b[0];
      ex_clr   <= (state == RUN) && (c == '0);
      ex_last  <= (state == RUN) && last_step;
      ex_b0    <= (b == '0);
      out_load <= ex_last;
      ld_b0    <= ex_b0;
      if (out_load)          vcnt <= VW'(N);
      else if (vcnt != '0)   vcnt <= vcnt - VW'(1);
    end
  end

  assign act        = ex_act;
  assign acc_clr    = ex_clr;
  assign frame_bit  = out_load && ld_b0;
  assign out_valid  = (vcnt != '0);
  assign in_preload = (state == PRE);
  assign busy       = (state != IDLE) || ex_clr || ex_last || out_load || out_valid;
  assign t_frame    = t;

  // a new block's results may be loaded only after the last ones left
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) out_load |-> (vcnt <= VW'(1));
  endproperty
  a_no_overrun: assert property (p_no_overrun);

endmodule
