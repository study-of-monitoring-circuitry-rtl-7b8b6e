`timescale 1ns / 1ps
// sensor_array: the array of N sensors of the PV map and the multiplexer that
// returns the residue outputs of one of them.
//
// Sensor 0 is the reference sensor (counter only, counting ref_clk); sensors
// 1 to N-1 are ro_sensor instances of one RO type. ro_select and
// counter_select carry one enable bit per sensor; addr is shared by all
// counters; residues are the three ring outputs of the sensor chosen by
// sensor_id. counter_init (repeated-measurement variant) reaches only the
// sensor whose ro_select bit is set.
//
// The N = 1400 default, the reference sensor at index 0 and the per-sensor
// enables follow the design. Choosing the read-out sensor by a binary index
// rather than an N-bit select is this implementation's choice, as is
// PV_SPREAD_PPM: in simulation it gives sensor i a fixed period offset in
// [-PV_SPREAD_PPM/2, +PV_SPREAD_PPM/2] drawn from its index, standing for
// process variation; 0 makes every RO nominal.
module sensor_array
  import pvmap_pkg::*;
#(
  parameter int unsigned N_SENSORS     = 1400,
  parameter ro_type_e    RO_TYPE       = RO_8_CC2_8_CC2,
  parameter int unsigned PV_SPREAD_PPM = 0,
  localparam int unsigned IDW = $clog2(N_SENSORS)
) (
  input  logic                 ctrl_clk,
  input  logic                 ref_clk,
  input  logic [N_SENSORS-1:0] ro_select,
  input  logic [N_SENSORS-1:0] counter_select,
  input  logic                 counter_init,
  input  logic [14:0]          addr,
  input  logic [IDW-1:0]       sensor_id,
  output logic [2:0]           residues
);

  // Fixed pseudo-random offset of sensor i, in ppm.
  function automatic int variation_ppm(int unsigned i);
    int unsigned h;
    h = (i * 32'd2654435761) ^ (i >> 3);
    if (PV_SPREAD_PPM == 0) return 0;
    return int'(h % (PV_SPREAD_PPM + 1)) - int'(PV_SPREAD_PPM / 2);
  endfunction

  logic [2:0] sensor_q [N_SENSORS];

  ref_sensor u_ref (
    .ref_clk,
    .counter_select(counter_select[0]),
    .counter_init  (counter_init & ro_select[0]),
    .addr,
    .residues      (sensor_q[0])
  );

  for (genvar i = 1; i < N_SENSORS; i++) begin : g_sensor
    ro_sensor #(.RO_TYPE(RO_TYPE), .VARIATION_PPM(variation_ppm(i))) u_sensor (
      .ctrl_clk,
      .ro_select     (ro_select[i]),
      .counter_select(counter_select[i]),
      .counter_init  (counter_init & ro_select[i]),
      .addr,
      .residues      (sensor_q[i])
    );
  end

  always_comb begin
    residues = '0;
    if (32'(sensor_id) < N_SENSORS) residues = sensor_q[sensor_id];
  end

endmodule
