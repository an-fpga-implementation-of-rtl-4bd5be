`timescale 1ns/1ps
// pll_4phase_model: BEHAVIOURAL MODEL (not synthesizable) of the FPGA's
// phase-locked loop as the DPWM uses it.
//
// The real part is the vendor's PLL primitive: it multiplies the 100 MHz
// controller clock CLKI to 130 MHz and gives four outputs shifted by 0, 45,
// 90 and 135 degrees (CLKOP, CLKOS, CLKOS2, CLKOS3). This model does not
// track the input phase; it counts LOCK_EDGES rising edges of CLKI, then
// starts four free-running clocks of period PERIOD_NS, each lagging the
// previous one by PERIOD_NS/8, and raises LOCK. RST stops the outputs and
// drops LOCK. Frequencies and phases follow the document; the lock
// behaviour is this model's own.
module pll_4phase_model #(
  parameter real         PERIOD_NS  = 1000.0 / 130.0,  // 130 MHz outputs
  parameter int unsigned LOCK_EDGES = 8
) (
  input  logic CLKI,
  input  logic RST,
  output logic CLKOP,   // 0 degrees   (CLK_0)
  output logic CLKOS,   // 45 degrees  (CLK_45)
  output logic CLKOS2,  // 90 degrees  (CLK_90)
  output logic CLKOS3,  // 135 degrees (CLK_135)
  output logic LOCK
);
  int unsigned edges;
  logic        running;

  initial begin
    edges   = 0;
    running = 1'b0;
    LOCK    = 1'b0;
    CLKOP   = 1'b0;
    CLKOS   = 1'b0;
    CLKOS2  = 1'b0;
    CLKOS3  = 1'b0;
  end

  always @(posedge CLKI or posedge RST) begin
    if (RST) begin
      edges   <= 0;
      running <= 1'b0;
      LOCK    <= 1'b0;
    end else if (!running) begin
      edges <= edges + 1;
      if (edges + 1 >= LOCK_EDGES) begin
        running <= 1'b1;
        LOCK    <= 1'b1;
      end
    end
  end

  // one generator per output; a shifted output starts k/8 of a period late
  always begin
    wait (running);
    while (running) begin
      CLKOP = 1'b1;
      #(PERIOD_NS / 2.0);
      CLKOP = 1'b0;
      #(PERIOD_NS / 2.0);
    end
  end

  always begin
    wait (running);
    #(PERIOD_NS / 8.0);
    while (running) begin
      CLKOS = 1'b1;
      #(PERIOD_NS / 2.0);
      CLKOS = 1'b0;
      #(PERIOD_NS / 2.0);
    end
  end

  always begin
    wait (running);
    #(PERIOD_NS * 2.0 / 8.0);
    while (running) begin
      CLKOS2 = 1'b1;
      #(PERIOD_NS / 2.0);
      CLKOS2 = 1'b0;
      #(PERIOD_NS / 2.0);
    end
  end

  always begin
    wait (running);
    #(PERIOD_NS * 3.0 / 8.0);
    while (running) begin
      CLKOS3 = 1'b1;
      #(PERIOD_NS / 2.0);
      CLKOS3 = 1'b0;
      #(PERIOD_NS / 2.0);
    end
  end
endmodule
