// array_ctrl: AXI4-Lite start register, pass sequencer and interrupt of the array.
//
// The array processor is an AXI4-Lite slave with one register. Any write to it
// starts one frame, whatever the data; a read returns 0 and has no side effect.
// While the pass runs the controller holds the compute/not-reset net high and
// issues one array clock enable `tick` every CLK_DIV bus clocks; after PASS ticks
// it drops `compute` (which also resets the processors' carries) and raises `irq`.
// `irq` stays high until the next start, so the interrupt controller sees one
// rising edge per finished frame.
//
// The source design runs the array from its own slow clock (just above 0.31 MHz);
// here that clock is an enable derived from the bus clock, with CLK_DIV = 320
// giving 0.3125 MHz from 100 MHz. The register map (single address, address bits
// ignored) and the start/interrupt behaviour follow the source; the clock-enable
// scheme, OKAY-only responses, dropping starts that arrive during a pass and
// holding `irq` until the next start are this design's choices.
//
// Timing: `compute` rises the cycle after the write is accepted; the pass lasts
// PASS * CLK_DIV bus cycles; `irq` rises in the cycle `compute` falls.
module array_ctrl
  import lap_pkg::*;
#(
  parameter int unsigned CLK_DIV = 320,
  parameter int unsigned PASS    = PASS_CYCLES
) (
  input  logic        aclk,
  input  logic        aresetn,
  // AXI4-Lite slave
  input  logic [31:0] s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [31:0] s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // array side
  output logic        compute,
  output logic        tick,
  output logic        irq,
  output logic        start_dropped   // a start arrived while a pass was running
);

  typedef enum logic [0:0] {S_IDLE, S_RUN} state_e;

  state_e state;
  logic   aw_seen, w_seen, start;
  logic [$clog2(CLK_DIV+1)-1:0] div_cnt;
  logic [$clog2(PASS+1)-1:0]    tick_cnt;

  // ---------------- AXI4-Lite write channel ----------------
  assign s_axi_awready = !aw_seen && !s_axi_bvalid;
  assign s_axi_wready  = !w_seen  && !s_axi_bvalid;
  assign s_axi_bresp   = 2'b00;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      aw_seen      <= 1'b0;
      w_seen       <= 1'b0;
      s_axi_bvalid <= 1'b0;
      start        <= 1'b0;
    end else begin
      start <= 1'b0;
      if (s_axi_awvalid && s_axi_awready) aw_seen <= 1'b1;
      if (s_axi_wvalid  && s_axi_wready)  w_seen  <= 1'b1;
      if ((aw_seen || (s_axi_awvalid && s_axi_awready)) &&
          (w_seen  || (s_axi_wvalid  && s_axi_wready))) begin
        aw_seen      <= 1'b0;
        w_seen       <= 1'b0;
        s_axi_bvalid <= 1'b1;
        start        <= 1'b1;
      end
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
    end
  end

  // ---------------- AXI4-Lite read channel ----------------
  assign s_axi_arready = !s_axi_rvalid;
  assign s_axi_rdata   = '0;
  assign s_axi_rresp   = 2'b00;

  always_ff @(posedge aclk) begin
    if (!aresetn)                             s_axi_rvalid <= 1'b0;
    else if (s_axi_arvalid && s_axi_arready)  s_axi_rvalid <= 1'b1;
    else if (s_axi_rready)                    s_axi_rvalid <= 1'b0;
  end

  // ---------------- pass sequencer ----------------
  assign tick    = (state == S_RUN) && (div_cnt == $bits(div_cnt)'(CLK_DIV - 1));
  assign compute = (state == S_RUN);

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      state         <= S_IDLE;
      div_cnt       <= '0;
      tick_cnt      <= '0;
      irq           <= 1'b0;
      start_dropped <= 1'b0;
    end else begin
      start_dropped <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_RUN;
          div_cnt  <= '0;
          tick_cnt <= '0;
          irq      <= 1'b0;
        end
        S_RUN: begin
          if (start) start_dropped <= 1'b1;
          if (tick) begin
            div_cnt <= '0;
            if (tick_cnt == $bits(tick_cnt)'(PASS - 1)) begin
              state <= S_IDLE;
              irq   <= 1'b1;
            end else begin
              tick_cnt <= tick_cnt + 1'b1;
            end
          end else begin
            div_cnt <= div_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI handshake rules: a response stays valid until it is taken.
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                                  s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                                  s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid);

  logic unused;
  assign unused = ^{s_axi_awaddr, s_axi_wdata, s_axi_wstrb, s_axi_araddr};

endmodule
