// gtx_rx_model: behavioural model of one transceiver link as the receiving
// FPGA sees it (transmitter, fibre and GTX receiver together). Not
// synthesizable logic: a simulation stand-in for the vendor's hard block.
//
// Data: a symbol given at tx_in appears at rx_out BASE_LAT + bs_pos/4 clocks
// later, so the latency depends on the receive barrel shifter position
// bs_pos (0..19), as in the real part. While the PLL is unlocked nothing is
// received and resetdone is low.
// Initialisation: INIT_CLKS after reset resetdone rises with a position drawn
// from a 16-bit LFSR seeded by seed. Positions come back to a few favourite
// values (3, 7, 12) half of the time, otherwise any of 0..19.
// DRP: an access started by den answers with drdy three clocks later. Reading
// BS_ADDR gives {8'hA5, 3'b0, bs_pos}; PLL_ADDR is a plain register. Writing
// UNLOCK_MASK set into PLL_ADDR unlocks the PLL; writing it clear starts a
// relock that ends after RELOCK_CLKS with a new position. relocks counts them.
module gtx_rx_model #(
  parameter logic [6:0]  BS_ADDR     = 7'h4A,
  parameter logic [6:0]  PLL_ADDR    = 7'h1B,
  parameter logic [15:0] UNLOCK_MASK = 16'h0100,
  parameter int unsigned BASE_LAT    = 6,
  parameter int unsigned INIT_CLKS   = 50,
  parameter int unsigned RELOCK_CLKS = 40
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      seed,
  input  ul_pkg::ul_sym_t  tx_in,
  output ul_pkg::ul_sym_t  rx_out,
  output logic             resetdone,
  input  ul_pkg::drp_req_t drp_req,
  output ul_pkg::drp_rsp_t drp_rsp,
  output logic [4:0]       bs_pos,
  output int               relocks
);
  import ul_pkg::*;

  ul_sym_t     pipe [32];
  logic [15:0] lfsr;
  logic [15:0] pll_reg;
  int          timer;
  logic        unlocked, relocking;
  int          drp_wait;
  drp_req_t    drp_cur;

  function automatic logic [15:0] step(input logic [15:0] v);
    return {v[14:0], v[15] ^ v[13] ^ v[12] ^ v[10]};
  endfunction

  function automatic logic [4:0] pick(input logic [15:0] v);
    logic [4:0] fav [3] = '{5'd3, 5'd7, 5'd12};
    if (v[15]) return fav[v[1:0] % 3];
    return 5'(v[14:8] % 20);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) pipe[i] <= '0;
      lfsr      <= (seed == 0) ? 16'hACE1 : seed;
      pll_reg   <= 16'h0040;
      timer     <= INIT_CLKS;
      unlocked  <= 1'b0;
      relocking <= 1'b1;
      resetdone <= 1'b0;
      bs_pos    <= '0;
      relocks   <= 0;
      drp_wait  <= 0;
      drp_cur   <= '0;
      drp_rsp   <= '0;
    end else begin
      pipe[0] <= tx_in;
      for (int i = 1; i < 32; i++) pipe[i] <= pipe[i-1];
      // PLL lock
      if (relocking) begin
        if (timer == 0) begin
          relocking <= 1'b0;
          resetdone <= 1'b1;
          lfsr      <= step(step(lfsr));
          bs_pos    <= pick(step(lfsr));
        end else timer <= timer - 1;
      end
      // DRP
      drp_rsp.drdy <= 1'b0;
      if (drp_req.den) begin
        drp_cur  <= drp_req;
        drp_wait <= 3;
      end else if (drp_wait > 1) begin
        drp_wait <= drp_wait - 1;
      end else if (drp_wait == 1) begin
        drp_wait     <= 0;
        drp_rsp.drdy <= 1'b1;
        if (drp_cur.dwe) begin
          if (drp_cur.daddr == PLL_ADDR) begin
            pll_reg <= drp_cur.di;
            if ((drp_cur.di & UNLOCK_MASK) != 0) begin
              unlocked  <= 1'b1;
              relocking <= 1'b0;
              resetdone <= 1'b0;
            end else if (unlocked) begin
              unlocked  <= 1'b0;
              relocking <= 1'b1;
              timer     <= RELOCK_CLKS;
              relocks   <= relocks + 1;
            end
          end
        end else begin
          drp_rsp.dout <= (drp_cur.daddr == BS_ADDR) ? {8'hA5, 3'b000, bs_pos}
                        : (drp_cur.daddr == PLL_ADDR) ? pll_reg : 16'h0;
        end
      end
    end
  end

  always_comb begin
    rx_out = pipe[BASE_LAT - 1 + (bs_pos >> 2)];
    if (!resetdone) rx_out.valid = 1'b0;
  end
endmodule
