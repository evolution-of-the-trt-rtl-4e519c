// busy_monitor: dead-time monitoring and BUSY combination of the TRT-TTC module.
//
// Each of the NSRC BUSY inputs (the S-LINK full flags and the buffer-control
// BUSY of the RODs served by the module) is measured while it is enabled in
// `src_en`: `busy_time` accumulates the BC periods it was asserted, `busy_count`
// counts its assertions (rising edges) and `busy_max` keeps the longest single
// assertion.  `busy_out`, the OR of the enabled inputs, is the combined BUSY
// sent on to the central trigger.  Counters saturate and are cleared by
// `clear`.  Measuring the BUSY duration and forming the combined BUSY follow the
// document; the set of counters and their widths are this design's choice.
// Inputs are assumed synchronous to clk; busy_out is combinational.
module busy_monitor #(
  parameter int unsigned NSRC = 4,
  parameter int unsigned CW   = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSRC-1:0] busy_in,
  input  logic [NSRC-1:0] src_en,
  input  logic            clear,
  output logic            busy_out,
  output logic [CW-1:0]   busy_time  [NSRC],
  output logic [15:0]     busy_count [NSRC],
  output logic [CW-1:0]   busy_max   [NSRC]
);

  logic [NSRC-1:0] prev;
  logic [CW-1:0]   cur [NSRC];

  assign busy_out = |(busy_in & src_en);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0;
      for (int i = 0; i < NSRC; i++) begin
        busy_time[i]  <= '0;
        busy_count[i] <= '0;
        busy_max[i]   <= '0;
        cur[i]        <= '0;
      end
    end else begin
      prev <= busy_in & src_en;
      for (int i = 0; i < NSRC; i++) begin
        if (clear) begin
          busy_time[i]  <= '0;
          busy_count[i] <= '0;
          busy_max[i]   <= '0;
          cur[i]        <= '0;
        end else if (busy_in[i] && src_en[i]) begin
          if (busy_time[i] != '1) busy_time[i] <= busy_time[i] + 1;
          if (!prev[i] && busy_count[i] != '1) busy_count[i] <= busy_count[i] + 1;
          // length of the current assertion, including this cycle
          cur[i] <= prev[i] ? ((cur[i] != '1) ? cur[i] + 1 : cur[i]) : CW'(1);
          if ((prev[i] ? cur[i] + 1 : CW'(1)) > busy_max[i] && cur[i] != '1)
            busy_max[i] <= prev[i] ? cur[i] + 1 : CW'(1);
        end
      end
    end
  end

endmodule
