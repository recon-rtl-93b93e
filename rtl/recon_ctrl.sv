// recon_ctrl -- state machine and count register of the RECON neuron.
//
// Sequences one neuron evaluation on the shared CORDIC datapath:
//   start    : the X/Y/Z registers load input x, bias and weight (count = 0)
//   MAC      : ITER linear micro-rotations i = 0..ITER-1 per input; the
//              first step of every further input reloads X and Z with the
//              next input/weight while Y keeps the running sum
//   AF       : ITER hyperbolic micro-rotations i = 1..ITER; the first one
//              starts from X = 1/K, Y = 0 and Z = MAC result (Sel1..3 and Ctr
//              raised for that step only)
//   OUT      : capture is raised for one cycle so the activation back end
//              result is registered; count returns to 0
// count is incremented on every micro-rotation, so with one input (N_IN = 1)
// and ITER = 5 the MAC result is present at count = 5 and sinh/cosh at
// count = 10, after which the count register is reset, as in the design's
// flow chart and waveform. select = 1 marks the linear (MAC) mode, which is
// the polarity of the ROM labels and the waveform.
// Handling more than one input per neuron (N_IN > 1) by keeping Y between
// inputs is this design's extension for the multi-input network neurons.
// A start pulse while busy is ignored.
module recon_ctrl
  import recon_pkg::*;
#(
  parameter int unsigned ITER  = DEF_ITER,
  parameter int unsigned N_IN  = 1,
  parameter int unsigned IDX_W = $clog2(ITER + 1),
  parameter int unsigned K_W   = (N_IN > 1) ? $clog2(N_IN) : 1,
  parameter int unsigned CNT_W = $clog2(ITER * N_IN + ITER + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output phase_t           phase,
  output logic [CNT_W-1:0] count,
  output logic             busy,
  // CORDIC datapath control
  output logic             en,
  output logic             step,
  output logic             select,
  output logic             sel1,
  output logic             sel2,
  output logic             sel3,
  output logic             ctr,
  output logic [IDX_W-1:0] idx,
  output logic [K_W-1:0]   in_idx,    // which input/weight pair feeds x0/z0
  output logic             capture    // register the activation output
);

  localparam int unsigned CNT_MAX = ITER * N_IN + ITER;

  phase_t           ph_r;
  logic [IDX_W-1:0] it_r;
  logic [K_W-1:0]   k_r;
  logic [CNT_W-1:0] cnt_r;

  assign phase   = ph_r;
  assign count   = cnt_r;
  assign busy    = (ph_r != PH_IDLE);
  assign capture = (ph_r == PH_OUT);

  always_comb begin
    en     = 1'b0;
    step   = 1'b0;
    select = 1'b0;
    sel1   = 1'b0;
    sel2   = 1'b0;
    sel3   = 1'b0;
    ctr    = 1'b0;
    idx    = it_r;
    in_idx = k_r;
    unique case (ph_r)
      PH_IDLE: begin
        if (start) begin
          en     = 1'b1;
          select = 1'b1;
          sel1   = 1'b1;
          sel2   = 1'b1;
          sel3   = 1'b1;
          in_idx = '0;
        end
      end
      PH_MAC: begin
        en     = 1'b1;
        step   = 1'b1;
        select = 1'b1;
        sel1   = (it_r == '0) && (k_r != '0);
        sel3   = (it_r == '0) && (k_r != '0);
      end
      PH_AF: begin
        en   = 1'b1;
        step = 1'b1;
        sel1 = (it_r == IDX_W'(1));
        sel2 = (it_r == IDX_W'(1));
        sel3 = (it_r == IDX_W'(1));
        ctr  = (it_r == IDX_W'(1));
      end
      PH_OUT: ;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_r  <= PH_IDLE;
      it_r  <= '0;
      k_r   <= '0;
      cnt_r <= '0;
    end else begin
      unique case (ph_r)
        PH_IDLE: if (start) begin
          ph_r  <= PH_MAC;
          it_r  <= '0;
          k_r   <= '0;
          cnt_r <= '0;
        end
        PH_MAC: begin
          cnt_r <= cnt_r + 1'b1;
          if (it_r == IDX_W'(ITER - 1)) begin
            it_r <= '0;
            if (k_r == K_W'(N_IN - 1)) begin
              ph_r <= PH_AF;
              it_r <= IDX_W'(1);
            end else begin
              k_r <= k_r + 1'b1;
            end
          end else begin
            it_r <= it_r + 1'b1;
          end
        end
        PH_AF: begin
          cnt_r <= cnt_r + 1'b1;
          if (it_r == IDX_W'(ITER)) ph_r <= PH_OUT;
          else                      it_r <= it_r + 1'b1;
        end
        PH_OUT: begin
          ph_r  <= PH_IDLE;
          cnt_r <= '0;
        end
        default: ph_r <= PH_IDLE;
      endcase
    end
  end

  // The count register never passes the end of an evaluation.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) cnt_r <= CNT_W'(CNT_MAX))
    else $error("recon_ctrl: count %0d beyond %0d", cnt_r, CNT_MAX);

  // A micro-rotation index stays inside the ROM.
  a_idx_range: assert property (@(posedge clk) disable iff (!rst_n) it_r <= IDX_W'(ITER))
    else $error("recon_ctrl: iteration index %0d beyond %0d", it_r, ITER);

endmodule
