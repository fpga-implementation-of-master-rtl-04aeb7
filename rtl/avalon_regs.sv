// Avalon-MM slave register file between the master processor and the
// current-loop hardware.
//
// The master (a soft processor running the position and speed loops and the
// active disturbance rejection controller) writes the loop settings here and
// reads back currents, voltages, position and speed. 32-bit data, word
// addresses, no wait states, fixed read latency of one clock (readdatavalid
// marks the returned word). Signed 18-bit values are sign-extended on read.
//
//   addr  name        access  meaning
//   0     CTRL        rw      bit0 enable PWM and loop, bit2 irq enable;
//                             writing bit1 = 1 clears the PI integrators
//   1     PWMPRD      rw      PWM half period in clocks
//   2     ELEC_GAIN   rw      Q3.14 electrical angle (1/4096 turn) per count
//   3     ANGLE_OFS   rw      magnetic pole offset, 1/4096 electrical turn
//   4     ID_REF      rw      d-axis current reference (normally 0)
//   5     IQ_REF      rw      q-axis current reference (from the ADRC)
//   6..9  KD_NEW, KD_OLD, KQ_NEW, KQ_OLD   rw  Q3.14 incremental PI gains
//   10    KX          rw      Q3.14 sqrt(3)/2 * PWMPRD / Vdc
//   11    KY          rw      Q3.14 3/2 * PWMPRD / Vdc
//   12    V_LIM       rw      PI output limit
//   13,14 ADC_OFS_A/B rw      zero-current ADC offsets
//   15    IRQ         r/w1c   bit0 a control period finished, bit1 over-modulation seen
//   16..19 I_D, I_Q, V_D, V_Q           r
//   20    ANGLE       r       bits 11:0 theta_e, bits 18:16 sector
//   21    POS_MECH    r       22 POS_MULTI r    23 SPEED r
//   24,25 IA, IB      r       filtered phase currents
//   26..28 CMPA..CMPC r       29 LOOPS r (control periods run)
//   30,31 V_ALPHA, V_BETA r
// irq is high while IRQ bit0 is set and CTRL bit2 enables it.
// The document states only that the current-loop unit and the peripherals
// sit on the processor's Avalon bus; the register map, reset values and the
// interrupt are this design's choices. Reset values are derived from the
// parameters: ELEC_GAIN = POLE_PAIRS*4096/(4*ENC_LINES), KX and KY from
// PWMPRD and VDC (the DC-bus voltage in voltage LSBs).
module avalon_regs
  import servo_pkg::*;
#(
  parameter int PWMPRD     = 2500,
  parameter int POLE_PAIRS = 4,
  parameter int ENC_LINES  = 2500,
  parameter int VDC        = 16384,
  parameter int ADC_W      = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  // Avalon-MM slave
  input  logic [4:0]         avs_address,
  input  logic               avs_write,
  input  logic [31:0]        avs_writedata,
  input  logic               avs_read,
  output logic [31:0]        avs_readdata,
  output logic               avs_readdatavalid,
  output logic               irq,
  // to the hardware
  output vc_cfg_t            cfg,
  output logic               enable,
  output logic               pi_clear,
  output logic [ADC_W-1:0]   adc_ofs_a,
  output logic [ADC_W-1:0]   adc_ofs_b,
  // from the hardware
  input  vc_stat_t           stat,
  input  logic               loop_done,
  input  logic [17:0]        pos_mech,
  input  logic signed [31:0] pos_multi,
  input  sdata_t             speed,
  input  sdata_t             ia,
  input  sdata_t             ib,
  input  logic [15:0]        cmpa,
  input  logic [15:0]        cmpb,
  input  logic [15:0]        cmpc
);

  localparam real SQ3 = 1.7320508075688772;
  localparam sdata_t GAIN_DEF = W'($rtoi(real'(POLE_PAIRS) * 4096.0 * 16384.0 / real'(4 * ENC_LINES) + 0.5));
  localparam sdata_t KX_DEF   = W'($rtoi(SQ3 / 2.0 * real'(PWMPRD) * 16384.0 / real'(VDC) + 0.5));
  localparam sdata_t KY_DEF   = W'($rtoi(1.5 * real'(PWMPRD) * 16384.0 / real'(VDC) + 0.5));
  localparam sdata_t VLIM_DEF = W'($rtoi(real'(VDC) / SQ3));

  logic        irq_en;
  logic [1:0]  irq_flags;
  logic [31:0] loops;

  function automatic logic [31:0] sx(input sdata_t v);
    return 32'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.pwmprd    <= 16'(PWMPRD);
      cfg.elec_gain <= GAIN_DEF;
      cfg.angle_ofs <= '0;
      cfg.id_ref    <= '0;
      cfg.iq_ref    <= '0;
      cfg.kd_new    <= '0;
      cfg.kd_old    <= '0;
      cfg.kq_new    <= '0;
      cfg.kq_old    <= '0;
      cfg.kx        <= KX_DEF;
      cfg.ky        <= KY_DEF;
      cfg.v_lim     <= VLIM_DEF;
      enable        <= 1'b0;
      irq_en        <= 1'b0;
      pi_clear      <= 1'b0;
      adc_ofs_a     <= ADC_W'(1 << (ADC_W - 1));
      adc_ofs_b     <= ADC_W'(1 << (ADC_W - 1));
      irq_flags     <= '0;
      loops         <= '0;
    end else begin
      pi_clear <= 1'b0;
      if (loop_done) begin
        irq_flags[0] <= 1'b1;
        loops        <= loops + 1;
        if (stat.oversat) irq_flags[1] <= 1'b1;
      end
      if (avs_write) begin
        unique case (avs_address)
          5'd0:  begin enable <= avs_writedata[0]; pi_clear <= avs_writedata[1]; irq_en <= avs_writedata[2]; end
          5'd1:  cfg.pwmprd    <= avs_writedata[15:0];
          5'd2:  cfg.elec_gain <= avs_writedata[W-1:0];
          5'd3:  cfg.angle_ofs <= avs_writedata[11:0];
          5'd4:  cfg.id_ref    <= avs_writedata[W-1:0];
          5'd5:  cfg.iq_ref    <= avs_writedata[W-1:0];
          5'd6:  cfg.kd_new    <= avs_writedata[W-1:0];
          5'd7:  cfg.kd_old    <= avs_writedata[W-1:0];
          5'd8:  cfg.kq_new    <= avs_writedata[W-1:0];
          5'd9:  cfg.kq_old    <= avs_writedata[W-1:0];
          5'd10: cfg.kx        <= avs_writedata[W-1:0];
          5'd11: cfg.ky        <= avs_writedata[W-1:0];
          5'd12: cfg.v_lim     <= avs_writedata[W-1:0];
          5'd13: adc_ofs_a     <= avs_writedata[ADC_W-1:0];
          5'd14: adc_ofs_b     <= avs_writedata[ADC_W-1:0];
          5'd15: irq_flags     <= irq_flags & ~avs_writedata[1:0] | (loop_done ? {stat.oversat, 1'b1} : 2'b00);
          default: ;
        endcase
      end
    end
  end

  assign irq = irq_en && irq_flags[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avs_readdata      <= '0;
      avs_readdatavalid <= 1'b0;
    end else begin
      avs_readdatavalid <= avs_read;
      if (avs_read) begin
        unique case (avs_address)
          5'd0:  avs_readdata <= {29'd0, irq_en, 1'b0, enable};
          5'd1:  avs_readdata <= {16'd0, cfg.pwmprd};
          5'd2:  avs_readdata <= sx(cfg.elec_gain);
          5'd3:  avs_readdata <= {20'd0, cfg.angle_ofs};
          5'd4:  avs_readdata <= sx(cfg.id_ref);
          5'd5:  avs_readdata <= sx(cfg.iq_ref);
          5'd6:  avs_readdata <= sx(cfg.kd_new);
          5'd7:  avs_readdata <= sx(cfg.kd_old);
          5'd8:  avs_readdata <= sx(cfg.kq_new);
          5'd9:  avs_readdata <= sx(cfg.kq_old);
          5'd10: avs_readdata <= sx(cfg.kx);
          5'd11: avs_readdata <= sx(cfg.ky);
          5'd12: avs_readdata <= sx(cfg.v_lim);
          5'd13: avs_readdata <= 32'(adc_ofs_a);
          5'd14: avs_readdata <= 32'(adc_ofs_b);
          5'd15: avs_readdata <= {30'd0, irq_flags};
          5'd16: avs_readdata <= sx(stat.i_d);
          5'd17: avs_readdata <= sx(stat.i_q);
          5'd18: avs_readdata <= sx(stat.v_d);
          5'd19: avs_readdata <= sx(stat.v_q);
          5'd20: avs_readdata <= {13'd0, stat.sect_no, 4'd0, stat.theta_e};
          5'd21: avs_readdata <= 32'(pos_mech);
          5'd22: avs_readdata <= pos_multi;
          5'd23: avs_readdata <= sx(speed);
          5'd24: avs_readdata <= sx(ia);
          5'd25: avs_readdata <= sx(ib);
          5'd26: avs_readdata <= 32'(cmpa);
          5'd27: avs_readdata <= 32'(cmpb);
          5'd28: avs_readdata <= 32'(cmpc);
          5'd29: avs_readdata <= loops;
          5'd30: avs_readdata <= sx(stat.v_alpha);
          5'd31: avs_readdata <= sx(stat.v_beta);
          default: avs_readdata <= '0;
        endcase
      end
    end
  end

  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(avs_read && avs_write));

endmodule
