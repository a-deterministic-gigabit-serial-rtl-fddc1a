// gtx_init_ctrl: deterministic-latency initialisation of a transceiver
// receiver.
//
// The receiver of a GTX tile aligns the incoming bits to word boundaries with a
// 20-bit barrel shifter whose position after lock is arbitrary, so the link
// latency differs from one initialisation to the next. Following the document,
// this controller waits for the tile's internal initialisation to finish
// (resetdone), reads the barrel shifter position over the Dynamic
// Reconfiguration Port (DRP), and if it is not TARGET, unlocks the PLL that
// makes the parallel clock for a while through the DRP. The PLL relocks, the
// shifter lands in a new position, and the loop repeats until the position is
// the target; then aligned goes high and the received data can be used.
//
// The register address and field of the barrel shifter position are not
// documented by the vendor, and the document does not give the unlock method
// or its algorithm of several methods: BS_ADDR, BS_MASK, PLL_ADDR and
// UNLOCK_MASK are placeholders to set for the real tile, and one method is
// used (read-modify-write that sets UNLOCK_MASK, hold HOLD_CLKS, clear it
// again, wait SETTLE_CLKS). If resetdone falls while aligned, the controller
// starts over.
//
// DRP: one access at a time; den is a one-clock pulse with dwe/daddr/di, the
// access ends when drdy is high (dout valid for reads).
module gtx_init_ctrl #(
  parameter logic [6:0]  BS_ADDR     = 7'h4A,
  parameter logic [15:0] BS_MASK     = 16'h001F,
  parameter logic [6:0]  PLL_ADDR    = 7'h1B,
  parameter logic [15:0] UNLOCK_MASK = 16'h0100,
  parameter logic [4:0]  TARGET      = 5'd0,
  parameter int unsigned HOLD_CLKS   = 64,
  parameter int unsigned SETTLE_CLKS = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               resetdone,
  output ul_pkg::drp_req_t   drp_req,
  input  ul_pkg::drp_rsp_t   drp_rsp,
  output logic               aligned,
  output logic [7:0]         attempts,
  output logic [4:0]         bs_pos
);
  typedef enum logic [2:0] {
    S_WAIT_DONE, S_RD_BS_W, S_RD_PLL_W, S_WR_SET_W, S_HOLD, S_WR_CLR_W,
    S_SETTLE, S_ALIGNED
  } state_t;

  state_t      state;
  logic [15:0] pll_reg;   // PLL register value read before the unlock
  logic [15:0] timer;

  assign aligned = (state == S_ALIGNED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_WAIT_DONE;
      drp_req  <= '0;
      pll_reg  <= '0;
      timer    <= '0;
      attempts <= '0;
      bs_pos   <= '0;
    end else begin
      drp_req.den <= 1'b0;
      drp_req.dwe <= 1'b0;
      unique case (state)
        S_WAIT_DONE: if (resetdone) begin
          drp_req <= '{den: 1'b1, dwe: 1'b0, daddr: BS_ADDR, di: '0};
          state   <= S_RD_BS_W;
        end
        S_RD_BS_W: if (drp_rsp.drdy) begin
          bs_pos <= 5'(drp_rsp.dout & BS_MASK);
          if (5'(drp_rsp.dout & BS_MASK) == TARGET) begin
            state <= S_ALIGNED;
          end else begin
            drp_req <= '{den: 1'b1, dwe: 1'b0, daddr: PLL_ADDR, di: '0};
            state   <= S_RD_PLL_W;
          end
        end
        S_RD_PLL_W: if (drp_rsp.drdy) begin
          pll_reg  <= drp_rsp.dout;
          drp_req  <= '{den: 1'b1, dwe: 1'b1, daddr: PLL_ADDR, di: drp_rsp.dout | UNLOCK_MASK};
          attempts <= attempts + 1'b1;
          state    <= S_WR_SET_W;
        end
        S_WR_SET_W: if (drp_rsp.drdy) begin
          timer <= 16'(HOLD_CLKS);
          state <= S_HOLD;
        end
        S_HOLD: if (timer == 0) begin
          drp_req <= '{den: 1'b1, dwe: 1'b1, daddr: PLL_ADDR, di: pll_reg & ~UNLOCK_MASK};
          state   <= S_WR_CLR_W;
        end else timer <= timer - 1'b1;
        S_WR_CLR_W: if (drp_rsp.drdy) begin
          timer <= 16'(SETTLE_CLKS);
          state <= S_SETTLE;
        end
        S_SETTLE: if (timer == 0) state <= S_WAIT_DONE;
                  else timer <= timer - 1'b1;
        S_ALIGNED: if (!resetdone) state <= S_WAIT_DONE;
        default: state <= S_WAIT_DONE;
      endcase
    end
  end

  a_drp_one_access: assert property (@(posedge clk) disable iff (!rst_n)
    drp_req.den |=> !drp_req.den);
endmodule
