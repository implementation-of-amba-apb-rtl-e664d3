// tb_sys_counters: event counters filled by the monitors that the
// end-to-end testbench binds into the subsystem's blocks.
package tb_sys_counters;
  int n_write = 0, n_read = 0, n_b2b = 0, n_unmapped = 0;
  int n_sel [4] = '{0, 0, 0, 0};
  int n_tick = 0, n_expire = 0, n_txframe = 0, n_rxbyte = 0;
  int t_exp [$];
  int cyc = 0;
endpackage
