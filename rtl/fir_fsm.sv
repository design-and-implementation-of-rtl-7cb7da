// fir_fsm: controller of the first interpolation stage.
//
// A Moore machine (state register plus next-state logic) that walks through
// the two halves of every input-sample period:
//   first half  (lr_clk = 0): WR_ST writes the new sample over the oldest one,
//                 LOW_OP_ST runs the 38 multiply-accumulate cycles, READY_ST waits;
//   second half (lr_clk = 1): WR_ST (no write), HIGH_OP_ST walks the 38 RAM
//                 words so the centre-tap sample can be picked up, READY_ST waits.
// Transitions: IDLE_ST -> WR_ST and READY_ST -> WR_ST on tick_0; WR_ST ->
// LOW_OP_ST or HIGH_OP_ST by lr_clk; the operating states -> READY_ST on
// tick_39. The states, the tick names and the cycle budget (cycle 0 unused,
// cycle 1 writing, cycles 2..39 operating) follow the document; the next-state
// rules are this design's reading of it.
//
// Addressing (ram_pr always points at the newest sample while operating):
//   LOW_OP_ST   ram_addr runs pr, pr+1, ... (mod 38) one word per cycle: the
//               newest sample first, then the oldest up to the second newest;
//               rom_addr runs 0,0,1,...,18,18,17,...,1 under rom_tick_inc and
//               rom_tick_dec, so samples of age a and 37-a meet h(a). At
//               tick_39 ram_pr and ram_addr advance to the oldest sample (the
//               next write position) and rom_addr returns to 0.
//   HIGH_OP_ST  ram_addr runs from ram_pr round the buffer; at tick_39 it
//               returns to ram_pr. rom_en is 0 in this state.
// ram_en is 1 in every state (the RAM is read or written in all of them);
// it stays a port so the RAM keeps its enable. ram_we = 1 only in the
// first-half WR_ST. mac_rst and reg_rst are 1 in
// IDLE_ST, WR_ST and HIGH_OP_ST, 0 in LOW_OP_ST and in the first READY_HOLD = 6
// cycles of READY_ST (so the products still in the multiplier pipeline reach
// the accumulator), 1 afterwards, and are registered, i.e. they lag the state
// by one cycle to match the memory read latency.
// Reset (rst, synchronous) returns to IDLE_ST with both pointers at 0.
module fir_fsm
  import interp_pkg::*;
#(
  parameter int unsigned READY_HOLD = MULT_LATENCY,
  parameter int unsigned DEPTH      = N_TAPS,
  parameter int unsigned AW         = $clog2(DEPTH)
) (
  input  logic          sys_clk,
  input  logic          rst,
  input  logic          lr_clk,
  input  logic          tick_0,
  input  logic          tick_39,
  input  logic          rom_tick_inc,
  input  logic          rom_tick_dec,
  output fir_state_t    state,
  output logic          ram_en,
  output logic          ram_we,
  output logic [AW-1:0] ram_addr,
  output logic [AW-1:0] ram_pr,
  output logic          rom_en,
  output logic [4:0]    rom_addr,
  output logic          mac_rst,
  output logic          reg_rst
);

  fir_state_t state_next;
  logic [3:0] ready_cnt;
  logic       mac_rst_pre;

  function automatic logic [AW-1:0] wrap_inc(input logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + AW'(1);
  endfunction

  // next-state logic
  always_comb begin
    state_next = state;
    unique case (state)
      IDLE_ST:    if (tick_0)  state_next = WR_ST;
      WR_ST:      state_next = lr_clk ? HIGH_OP_ST : LOW_OP_ST;
      LOW_OP_ST:  if (tick_39) state_next = READY_ST;
      HIGH_OP_ST: if (tick_39) state_next = READY_ST;
      READY_ST:   if (tick_0)  state_next = WR_ST;
      default:    state_next = IDLE_ST;
    endcase
  end

  // state register
  always_ff @(posedge sys_clk) begin
    if (rst) state <= IDLE_ST;
    else     state <= state_next;
  end

  // address and pointer registers
  always_ff @(posedge sys_clk) begin
    if (rst) begin
      ram_addr <= '0;
      ram_pr   <= '0;
      rom_addr <= '0;
    end else begin
      unique case (state)
        LOW_OP_ST: begin
          if (tick_39) begin
            ram_pr   <= wrap_inc(ram_pr);
            ram_addr <= wrap_inc(ram_pr);
          end else begin
            ram_addr <= wrap_inc(ram_addr);
          end
          if (rom_tick_inc)      rom_addr <= rom_addr + 5'd1;
          else if (rom_tick_dec) rom_addr <= rom_addr - 5'd1;
        end
        HIGH_OP_ST: begin
          if (tick_39) ram_addr <= ram_pr;
          else         ram_addr <= wrap_inc(ram_addr);
        end
        default: ;
      endcase
    end
  end

  // cycles spent in READY_ST
  always_ff @(posedge sys_clk) begin
    if (rst || state != READY_ST) ready_cnt <= '0;
    else if (ready_cnt != '1)     ready_cnt <= ready_cnt + 4'd1;
  end

  always_comb begin
    ram_en = 1'b1;
    ram_we = (state == WR_ST) && !lr_clk;
    rom_en = (state != HIGH_OP_ST);
    unique case (state)
      LOW_OP_ST: mac_rst_pre = 1'b0;
      READY_ST:  mac_rst_pre = (ready_cnt >= 4'(READY_HOLD));
      default:   mac_rst_pre = 1'b1;
    endcase
  end

  always_ff @(posedge sys_clk) begin
    if (rst) begin
      mac_rst <= 1'b1;
      reg_rst <= 1'b1;
    end else begin
      mac_rst <= mac_rst_pre;
      reg_rst <= mac_rst_pre;
    end
  end

endmodule
